// tb_free_ram: random reads and writes against a reference array in the
// synchronous single-port, synchronous dual-port and asynchronous modes, a
// dual-port request on a single-port-only RAM, and a stuck storage cell.
module tb_free_ram;
  import bist_pkg::*;

  logic       clk = 1'b0;
  logic       sync_mode, dual_port, we;
  logic [4:0] waddr, raddr;
  logic [3:0] din;
  logic [3:0] dout_dp, dout_sp;
  ram_fault_t fault;
  logic [3:0] model [32];
  int         checks = 0, failures = 0;

  free_ram #(.DP_CAPABLE(1'b1)) dut_dp (.clk, .sync_mode, .dual_port, .we, .waddr, .raddr,
                                        .din, .dout(dout_dp), .fault);
  free_ram #(.DP_CAPABLE(1'b0)) dut_sp (.clk, .sync_mode, .dual_port, .we, .waddr, .raddr,
                                        .din, .dout(dout_sp), .fault('0));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] expect_word(logic [4:0] a);
    logic [3:0] w = model[a];
    if (fault.en && fault.addr == a) w[fault.bit_idx] = fault.val;
    return w;
  endfunction

  task automatic check(logic [3:0] got, logic [3:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    fault = '0; we = 1'b0; waddr = '0; raddr = '0; din = '0;
    // fill in synchronous single-port mode
    sync_mode = 1'b1; dual_port = 1'b0;
    for (int a = 0; a < 32; a++) begin
      waddr = 5'(a); din = 4'($urandom); we = 1'b1;
      @(posedge clk); #1 model[a] = din; we = 1'b0;
    end
    for (int a = 0; a < 32; a++) begin
      waddr = 5'(a); #1;
      check(dout_dp, model[a], "sp read");
      check(dout_sp, model[a], "sp-only read");
    end
    // synchronous dual-port: independent read while writing
    dual_port = 1'b1;
    for (int i = 0; i < 200; i++) begin
      waddr = 5'($urandom); raddr = 5'($urandom); din = 4'($urandom);
      we = 1'($urandom_range(0, 1));
      #1;
      check(dout_dp, model[raddr], "dp read");
      check(dout_sp, model[waddr], "sp-only ignores dual_port");
      @(posedge clk); #1;
      if (we) model[waddr] = din;
      we = 1'b0;
    end
    // asynchronous single-port: we is the strobe, clk does not write
    sync_mode = 1'b0; dual_port = 1'b0;
    for (int i = 0; i < 100; i++) begin
      waddr = 5'($urandom); din = 4'($urandom);
      @(posedge clk); #1;           // a clock edge without strobe
      check(dout_dp, model[waddr], "async no write on clk");
      #2 we = 1'b1; #2 we = 1'b0;
      model[waddr] = din;
      #1 check(dout_dp, din, "async write");
    end
    // stuck cell
    fault = '{en: 1'b1, addr: 5'd9, bit_idx: 2'd2, val: 1'b1};
    for (int a = 0; a < 32; a++) begin
      waddr = 5'(a); #1;
      check(dout_dp, expect_word(5'(a)), "stuck cell");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
