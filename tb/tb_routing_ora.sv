// tb_routing_ora: applies correct and corrupted parity patterns to an even and
// an odd parity ORA and checks that an error is detected and stays latched.
module tb_routing_ora;
  logic       clk = 1'b0;
  logic       rst, en;
  logic [2:0] w_e, w_o;
  logic       f_e, f_o;
  logic       m_e, m_o;
  int         checks = 0, failures = 0;

  routing_ora #(.ODD(1'b0)) dut_e (.clk, .rst, .en, .wut(w_e), .fail(f_e));
  routing_ora #(.ODD(1'b1)) dut_o (.clk, .rst, .en, .wut(w_o), .fail(f_o));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a pattern with the wanted parity, optionally one bit flipped
  function automatic logic [2:0] pat(bit odd, bit corrupt);
    logic [1:0] c = 2'($urandom_range(0, 3));
    logic       p = (c[0] ^ c[1]) ^ odd;
    logic [2:0] v = {p, c};
    if (corrupt) v[$urandom_range(0, 2)] ^= 1'b1;
    return v;
  endfunction

  initial begin
    en = 1'b1;
    for (int round = 0; round < 8; round++) begin
      rst = 1'b1; #1 rst = 1'b0;
      m_e = 1'b0; m_o = 1'b0;
      for (int i = 0; i < 16; i++) begin
        automatic bit ce = (round % 2 == 1) && (i == round);
        automatic bit co = (round >= 4) && (i == 2 * round - 5);
        w_e = pat(1'b0, ce);
        w_o = pat(1'b1, co);
        @(posedge clk); #1;
        m_e |= ce; m_o |= co;
        checks += 2;
        if (f_e !== m_e) begin failures++; $display("even r%0d i%0d", round, i); end
        if (f_o !== m_o) begin failures++; $display("odd r%0d i%0d", round, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
