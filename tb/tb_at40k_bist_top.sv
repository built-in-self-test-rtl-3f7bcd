// tb_at40k_bist_top: end-to-end run of all BIST configurations on a 12 x 12
// core (3 x 3 RAMs) with four WUT sets, acting as the tester that loads each
// configuration, runs it and reads the results.
//
//   logic BIST: the ten configurations (five modes in session 1, then in
//     session 2) with the routing scheme alternating from one configuration
//     to the next, and once more with a defective cell; then four
//     configurations rotated by 90 degrees, and one with a defective cell;
//   RAM BIST: the three algorithms fault-free and with a stuck cell;
//   routing BIST: fault-free wiring, a stuck wire and a short.
//
// Each mechanism (both sessions, both schemes, every mode, rotation, the ORA shift-out,
// each RAM algorithm, detection in each part) is counted; one that never
// happens is a failure.
module tb_at40k_bist_top;
  import bist_pkg::*;

  localparam int N = 12, G = N / 4, NRAM = G * G, NS = 4;

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

  typedef enum int {
    M_SESSION1, M_SESSION2, M_SCHEME1, M_SCHEME2, M_FGEN1R, M_FGEN1, M_FGEN1RF, M_MGEN,
    M_FGEN2F, M_ROTATED, M_LB_SHIFT, M_LB_DETECT, M_DPR, M_MARCH_LR, M_MARCH_Y, M_RB_SHIFT,
    M_RB_DETECT, M_RT_RUN, M_RT_DETECT, M_COUNT
  } mech_e;
  int seen [M_COUNT];
  bit lb_snap [N][N];   // ORA flags of the last logic configuration, before shift-out

  // wiring model for the routing BIST: 0 none, 1 stuck-at-1, 2 short
  int rt_defect;

  at40k_bist_top #(.ARRAY_SIZE(N), .ROUTE_SETS(NS)) dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    for (int i = 0; i < NS; i++) rt_wut_rx[i] = rt_wut_tx[i];
    if (rt_defect == 1) rt_wut_rx[2][1] = 1'b1;
    if (rt_defect == 2) begin
      rt_wut_rx[0][0] = rt_wut_tx[0][0] & rt_wut_tx[0][2];
      rt_wut_rx[0][2] = rt_wut_tx[0][0] & rt_wut_tx[0][2];
    end
  end

  initial begin
    #200000000;
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

  // --- logic BIST: one configuration, returns the number of set flags read out
  task automatic logic_config(bit s, bit sch, but_mode_e m, output int nflags, input bit rot = 1'b0);
    int flags_par = 0;
    nflags = 0;
    lb_session = s; lb_scheme = sch; lb_rotate = rot; lb_mode = m; lb_shift = 1'b0; lb_run = 1'b0;
    lb_cfg_init = 1'b1; lb_tpg_rst = 1'b1; lb_ora_rst = 1'b1;
    @(posedge clk); #1 lb_cfg_init = 1'b0; lb_tpg_rst = 1'b0; lb_ora_rst = 1'b0; lb_run = 1'b1;
    repeat (64) @(posedge clk);
    #1 lb_run = 1'b0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        flags_par += lb_ora_fail[r][c];
        lb_snap[r][c] = lb_ora_fail[r][c];
      end
    lb_shift = 1'b1;
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) nflags += lb_scan_out[c];
      @(posedge clk); #1;
    end
    lb_shift = 1'b0;
    seen[M_LB_SHIFT]++;
    seen[s ? M_SESSION2 : M_SESSION1]++;
    seen[sch ? M_SCHEME2 : M_SCHEME1]++;
    seen[M_FGEN1R + int'(m)]++;
    if (rot) seen[M_ROTATED]++;
    check(nflags == flags_par, "logic shift-out matches parallel flags");
  endtask

  // --- RAM BIST: one algorithm, returns the failing ORA indices from the shift-out
  task automatic ram_config(ram_alg_e a, int exp_cycles, output int fails [$]);
    int cycles = 0;
    fails = {};
    rb_alg = a; rb_shift = 1'b0;
    rb_rst = 1'b1; @(posedge clk); #1 rb_rst = 1'b0;
    rb_start = 1'b1; @(posedge clk); #1 rb_start = 1'b0;
    while (rb_busy) begin @(posedge clk); #1; cycles++; end
    check(cycles == exp_cycles, $sformatf("%s takes %0d cycles (got %0d)", a.name(),
                                          exp_cycles, cycles));
    check(rb_done, "RAM BIST done");
    rb_shift = 1'b1;
    for (int j = NRAM * 4 - 1; j >= 0; j--) begin
      if (rb_scan_out) fails.push_back(j);
      @(posedge clk); #1;
    end
    rb_shift = 1'b0;
    seen[M_RB_SHIFT]++;
    seen[M_DPR + int'(a)]++;
  endtask

  // --- routing BIST
  task automatic route_config(int defect);
    rt_defect = defect;
    rt_rst = 1'b1; rt_run = 1'b0;
    @(posedge clk); #1 rt_rst = 1'b0; rt_run = 1'b1;
    repeat (8) @(posedge clk);
    #1 rt_run = 1'b0;
    seen[M_RT_RUN]++;
  endtask

  initial begin
    int nf;
    int fl [$];
    lb_cfg_init = 1'b1; lb_tpg_rst = 1'b1; lb_ora_rst = 1'b1; lb_run = 1'b0;
    lb_session = 1'b0; lb_scheme = 1'b0; lb_rotate = 1'b0; lb_shift = 1'b0; lb_mode = BUT_FGEN1R;
    rb_rst = 1'b1; rb_start = 1'b0; rb_shift = 1'b0; rb_alg = ALG_DPR;
    rt_rst = 1'b1; rt_run = 1'b0; rt_defect = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) lb_fault[r][c] = '0;
    for (int k = 0; k < NRAM; k++) rb_fault[k] = '0;
    #12;

    // ---------------- logic BIST: 2 sessions x 5 configurations, fault-free
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < NUM_BUT_MODES; m++) begin
        logic_config(1'(s), 1'(m % 2), but_mode_e'(m), nf);
        check(nf == 0, $sformatf("logic session %0d config %0d passes", s + 1, m + 1));
      end
    // a cell with its Y output stuck at 0, tested as a BUT in session 2
    lb_fault[5][4].y_sa_en = 1'b1;
    lb_fault[5][4].sa_val  = 1'b0;
    logic_config(1'b1, 1'b1, BUT_FGEN1, nf);   // scheme 2: Y feeds ORA (5, 5)
    check(nf == 1 && lb_snap[5][5] == 1'b1, "logic defect located at ORA (5,5)");
    if (nf == 1) seen[M_LB_DETECT]++;
    logic_config(1'b0, 1'b1, BUT_FGEN1, nf);   // session 1: cell (5,4) is an ORA
    check(nf == 0, "defect not seen when the cell is not a BUT");
    lb_fault[5][4] = '0;
    // four rotated configurations (two modes, two sessions) for the
    // horizontal bus connections
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 2; k++) begin
        logic_config(1'(s), 1'(k), (k != 0) ? BUT_MGEN : BUT_FGEN1, nf, 1'b1);
        check(nf == 0, $sformatf("rotated session %0d configuration %0d passes", s + 1, k + 1));
      end
    // rotated, session 2, scheme 2: the X output of cell (4,5) reaches ORA (3,4)
    lb_fault[4][5].x_sa_en = 1'b1;
    lb_fault[4][5].sa_val  = 1'b0;
    logic_config(1'b1, 1'b1, BUT_FGEN1, nf, 1'b1);
    check(nf == 1 && lb_snap[3][4] == 1'b1, "rotated defect located at ORA (3,4)");
    lb_fault[4][5] = '0;

    // ---------------- RAM BIST, fault-free
    ram_config(ALG_DPR, 128, fl);          check(fl.size() == 0, "DPR passes");
    ram_config(ALG_MARCH_LR_BDS, 960, fl); check(fl.size() == 0, "March-LR passes");
    ram_config(ALG_MARCH_Y, 512, fl);      check(fl.size() == 0, "March-Y passes");
    // RAM 4 (row 1, column 1), bit 3, word 6 stuck at 0
    rb_fault[4] = '{en: 1'b1, addr: 5'd6, bit_idx: 2'd3, val: 1'b0};
    ram_config(ALG_MARCH_LR_BDS, 960, fl);
    check(fl.size() == 1 && fl[0] == 4 * 4 + 3, "March-LR names RAM 4 bit 3");
    ram_config(ALG_MARCH_Y, 512, fl);
    check(fl.size() == 1 && fl[0] == 4 * 4 + 3, "March-Y names RAM 4 bit 3");
    ram_config(ALG_DPR, 128, fl);
    // row 1 ring: RAMs 3 and 4; both ORAs comparing RAM 4 fail
    check(fl.size() == 2 && fl[0] == 4 * 4 + 3 && fl[1] == 3 * 4 + 3,
          "DPR flags the two comparisons with RAM 4");
    if (fl.size() == 2) seen[M_RB_DETECT]++;
    rb_fault[4] = '0;

    // ---------------- routing BIST
    route_config(0);
    check(!rt_any_fail, "routing passes on fault-free wiring");
    route_config(1);
    check(rt_fail[2] && !rt_fail[0] && !rt_fail[1] && !rt_fail[3], "stuck wire in set 2");
    route_config(2);
    check(rt_fail[0] && !rt_fail[1] && !rt_fail[2] && !rt_fail[3], "short in set 0");
    if (rt_fail[0]) seen[M_RT_DETECT]++;
    rt_defect = 0;

    for (int i = 0; i < M_COUNT; i++) begin
      mech_e e;
      e = mech_e'(i);
      $display("mechanism %-12s happened %0d times", e.name(), seen[i]);
      check(seen[i] > 0, {"mechanism ", e.name(), " happened"});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
