// bist_size_run: drives one at40k_bist_top of ARRAY_SIZE = N through the ten
// logic BIST configurations (five modes in each session, routing scheme
// alternating) and the three RAM BIST algorithms on a fault-free device, and
// reports how many checks it made and how many failed. Used by
// tb_device_sizes to run the devices of different array sizes.
module bist_size_run
  import bist_pkg::*;
#(
  parameter int N = 16
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int G = N / 4, NRAM = G * G, NS = 8;

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

  at40k_bist_top #(.ARRAY_SIZE(N), .ROUTE_SETS(NS)) dut (.*);

  assign rt_wut_rx = rt_wut_tx;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("N=%0d FAIL: %s", N, what);
    end
  endtask

  initial begin
    int flags, cycles;
    checks = 0; failures = 0; finished = 1'b0;
    lb_cfg_init = 1'b1; lb_tpg_rst = 1'b1; lb_ora_rst = 1'b1; lb_run = 1'b0;
    lb_session = 1'b0; lb_scheme = 1'b0; lb_rotate = 1'b0; lb_shift = 1'b0; lb_mode = BUT_FGEN1R;
    rb_rst = 1'b1; rb_start = 1'b0; rb_shift = 1'b0; rb_alg = ALG_DPR;
    rt_rst = 1'b1; rt_run = 1'b0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) lb_fault[r][c] = '0;
    for (int k = 0; k < NRAM; k++) rb_fault[k] = '0;
    @(posedge clk); #1;
    for (int cfg = 0; cfg < 2 * NUM_BUT_MODES; cfg++) begin
      lb_session = (cfg >= NUM_BUT_MODES);
      lb_mode    = but_mode_e'(cfg % NUM_BUT_MODES);
      lb_scheme  = cfg[0];
      lb_cfg_init = 1'b1; lb_tpg_rst = 1'b1; lb_ora_rst = 1'b1;
      @(posedge clk); #1 lb_cfg_init = 1'b0; lb_tpg_rst = 1'b0; lb_ora_rst = 1'b0; lb_run = 1'b1;
      repeat (64) @(posedge clk);
      #1 lb_run = 1'b0; lb_shift = 1'b1; flags = 0;
      for (int r = 0; r < N; r++) begin
        for (int c = 0; c < N; c++) flags += lb_scan_out[c];
        @(posedge clk); #1;
      end
      lb_shift = 1'b0;
      check(flags == 0, $sformatf("logic configuration %0d passes", cfg + 1));
    end
    for (int a = 0; a < 3; a++) begin
      rb_alg = ram_alg_e'(a);
      rb_rst = 1'b1; @(posedge clk); #1 rb_rst = 1'b0;
      rb_start = 1'b1; @(posedge clk); #1 rb_start = 1'b0;
      cycles = 0;
      while (rb_busy) begin @(posedge clk); #1; cycles++; end
      check(cycles == (a == 0 ? 128 : a == 1 ? 960 : 512), "RAM test length");
      rb_shift = 1'b1; flags = 0;
      repeat (NRAM * 4) begin flags += rb_scan_out; @(posedge clk); #1; end
      rb_shift = 1'b0;
      check(flags == 0, $sformatf("RAM algorithm %0d passes on %0d RAMs", a, NRAM));
    end
    finished = 1'b1;
  end
endmodule
