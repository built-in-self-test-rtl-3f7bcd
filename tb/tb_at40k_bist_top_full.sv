// tb_at40k_bist_top_full: the top at its default size (48 x 48 cells, 144
// RAMs, eight WUT sets), taken through one complete operation of each BIST
// family: one logic BIST configuration with a defective cell, read out
// through the ORA shift registers; March-LR with background data on all RAMs
// with one stuck cell, read out through the RAM ORA chain; and one routing
// BIST run over fault-free wiring.
module tb_at40k_bist_top_full;
  import bist_pkg::*;

  localparam int N = 48, G = N / 4, NRAM = G * G, NS = 8;

  logic       clk = 1'b0;
  logic       lb_cfg_init, lb_tpg_rst, lb_ora_rst, lb_run, lb_session, lb_scheme, lb_shift;
  logic       lb_rotate;
  but_mode_e  lb_mode;
  but_fault_t lb_fault [N][N];
  logic       lb_ora_fail [N][N];
  logic       lb_scan_out [N];
  logic       rb_rst, rb_start, rb_shift, rb_busy, rb_done, rb_scan_out;
  ram_alg_e   rb_alg;
  ram_fault_t rb_fault [NRAM];
  logic [3:0] rb_ora_fail [NRAM];
  logic       rt_rst, rt_run, rt_any_fail;
  logic [2:0] rt_wut_tx [NS];
  logic [2:0] rt_wut_rx [NS];
  logic       rt_fail [NS];
  int         checks = 0, failures = 0;

  at40k_bist_top dut (.*);

  always #5 clk = ~clk;

  assign rt_wut_rx = rt_wut_tx;

  initial begin
    #500000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cycles, hits, others;
    int fl [$];
    lb_cfg_init = 1'b1; lb_tpg_rst = 1'b1; lb_ora_rst = 1'b1; lb_run = 1'b0;
    lb_session = 1'b0; lb_scheme = 1'b0; lb_rotate = 1'b0; lb_shift = 1'b0; lb_mode = BUT_FGEN1R;
    rb_rst = 1'b1; rb_start = 1'b0; rb_shift = 1'b0; rb_alg = ALG_MARCH_LR_BDS;
    rt_rst = 1'b1; rt_run = 1'b0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) lb_fault[r][c] = '0;
    for (int k = 0; k < NRAM; k++) rb_fault[k] = '0;
    // cell (20, 33) has its X output stuck at 1; session 1, scheme 1:
    // its X output reaches ORA (21, 34)
    lb_fault[20][33].x_sa_en = 1'b1;
    lb_fault[20][33].sa_val  = 1'b1;
    // RAM 100, bit 1, word 17 stuck at 1
    rb_fault[100] = '{en: 1'b1, addr: 5'd17, bit_idx: 2'd1, val: 1'b1};
    @(posedge clk); #1;
    lb_cfg_init = 1'b0; lb_tpg_rst = 1'b0; lb_ora_rst = 1'b0; lb_run = 1'b1;
    rb_rst = 1'b0; rt_rst = 1'b0;
    rb_start = 1'b1; rt_run = 1'b1;
    @(posedge clk); #1 rb_start = 1'b0;
    // all three run concurrently; the logic BIST needs 64 clocks
    repeat (63) @(posedge clk);
    #1 lb_run = 1'b0; rt_run = 1'b0;
    check(!rt_any_fail, "routing BIST passes");
    check(lb_ora_fail[21][34] == 1'b1, "logic defect flagged at ORA (21,34)");
    // shift the logic ORA columns out
    lb_shift = 1'b1; hits = 0; others = 0;
    for (int r = N - 1; r >= 0; r--) begin
      for (int c = 0; c < N; c++)
        if (lb_scan_out[c]) begin
          if (r == 21 && c == 34) hits++; else others++;
        end
      @(posedge clk); #1;
    end
    lb_shift = 1'b0;
    check(hits == 1 && others == 0, "logic shift-out names only ORA (21,34)");
    // finish the RAM test
    cycles = 63 + N;   // clocks since start: the logic run and its shift-out
    while (rb_busy) begin @(posedge clk); #1; cycles++; end
    check(cycles == 960, $sformatf("March-LR with BDS takes 960 cycles (got %0d)", cycles));
    check(rb_done, "RAM BIST done");
    rb_shift = 1'b1;
    for (int j = NRAM * 4 - 1; j >= 0; j--) begin
      if (rb_scan_out) fl.push_back(j);
      @(posedge clk); #1;
    end
    check(fl.size() == 1 && fl[0] == 100 * 4 + 1, "RAM shift-out names RAM 100 bit 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
