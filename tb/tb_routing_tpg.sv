// tb_routing_tpg: checks both routing TPG variants: counting direction,
// parity type, and that every pair of pattern bits shows both (0,1) and (1,0)
// within one counter period.
module tb_routing_tpg;
  logic       clk = 1'b0;
  logic       rst, en;
  logic [2:0] p_up, p_dn;
  int         checks = 0, failures = 0;
  int         cu, cd;
  bit         seen01 [2][3];
  bit         seen10 [2][3];

  routing_tpg #(.DOWN(1'b0)) dut_up (.clk, .rst, .en, .pattern(p_up));
  routing_tpg #(.DOWN(1'b1)) dut_dn (.clk, .rst, .en, .pattern(p_dn));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void note_pairs(int t, logic [2:0] p);
    int k = 0;
    for (int i = 0; i < 3; i++)
      for (int j = i + 1; j < 3; j++) begin
        if (p[i] == 1'b0 && p[j] == 1'b1) seen01[t][k] = 1'b1;
        if (p[i] == 1'b1 && p[j] == 1'b0) seen10[t][k] = 1'b1;
        k++;
      end
  endfunction

  initial begin
    rst = 1'b1; en = 1'b0;
    @(posedge clk); #1 rst = 1'b0; en = 1'b1;
    cu = 0; cd = 0;
    for (int i = 0; i < 12; i++) begin
      checks += 4;
      if (p_up[1:0] !== cu[1:0]) failures++;
      if (p_dn[1:0] !== cd[1:0]) failures++;
      if ((^p_up) !== 1'b0) failures++;   // even parity
      if ((^p_dn) !== 1'b1) failures++;   // odd parity
      note_pairs(0, p_up);
      note_pairs(1, p_dn);
      @(posedge clk); #1;
      cu = (cu + 1) % 4;
      cd = (cd + 3) % 4;
    end
    for (int t = 0; t < 2; t++)
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (!(seen01[t][k] && seen10[t][k])) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
