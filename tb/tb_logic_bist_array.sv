// tb_logic_bist_array: an 8 x 8 logic BIST array through both sessions, all
// five BUT modes, both routing schemes and both orientations (columns, and
// rotated by 90 degrees), fault-free and with one defective BUT. It checks that exactly the ORAs wired to the defective output fail
// (worked out here from the row pairing and the two schemes) and that
// shifting every ORA column out returns the same flags, row N-1 first.
module tb_logic_bist_array;
  import bist_pkg::*;

  localparam int N = 8;
  localparam int RUN_CYCLES = 64;

  logic       clk = 1'b0;
  logic       cfg_init, tpg_rst, ora_rst, run, session, scheme, rotate, shift;
  but_mode_e  mode;
  but_fault_t fault [N][N];
  logic       ora_fail [N][N];
  logic       scan_out [N];
  int         checks = 0, failures = 0;
  int         detections = 0, configs = 0;

  logic_bist_array #(.N(N)) dut (.clk, .cfg_init, .tpg_rst, .ora_rst, .run, .session,
                                 .scheme, .rotate, .mode, .shift, .fault, .ora_fail, .scan_out);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_ora(bit s, int c);
    return s ? (c % 2 == 1 && c != N - 1) : (c % 2 == 0 && c != 0);
  endfunction

  function automatic bit is_but(bit s, int c);
    return s ? (c % 2 == 0 && c != N - 1) : (c % 2 == 1);
  endfunction

  // fr/fc: defective BUT (-1: none); fx/fy: which of its outputs is wrong
  // rot: row-oriented configuration, handled in transposed (logical)
  // coordinates: logical (a, b) is physical (b, a)
  task automatic run_config(bit s, bit sch, but_mode_e m, int fr, int fc, bit fx, bit fy,
                            but_fault_t f, bit rot = 1'b0);
    bit exp [N][N];
    bit lexp [N][N];
    int tr, tc, lr, lc;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        fault[r][c] = '0;
        lexp[r][c] = 1'b0;
      end
    if (fr >= 0) begin
      fault[fr][fc] = f;
      lr = rot ? fc : fr;
      lc = rot ? fr : fc;
      // X goes to the partner row, Y stays in the row (logical coordinates)
      if (fx) begin
        tr = lr ^ 1; tc = sch ? lc - 1 : lc + 1;
        if (tc >= 0 && tc < N && is_ora(s, tc)) lexp[tr][tc] = 1'b1;
      end
      if (fy) begin
        tr = lr; tc = sch ? lc + 1 : lc - 1;
        if (tc >= 0 && tc < N && is_ora(s, tc)) lexp[tr][tc] = 1'b1;
      end
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) exp[r][c] = rot ? lexp[c][r] : lexp[r][c];
    session = s; scheme = sch; rotate = rot; mode = m; shift = 1'b0; run = 1'b0;
    cfg_init = 1'b1; tpg_rst = 1'b1; ora_rst = 1'b1;
    @(posedge clk); #1 cfg_init = 1'b0; tpg_rst = 1'b0; ora_rst = 1'b0; run = 1'b1;
    repeat (RUN_CYCLES) @(posedge clk);
    #1 run = 1'b0;
    configs++;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (ora_fail[r][c] !== exp[r][c]) begin
          failures++;
          $display("s%0d sch%0d rot%0d %s fault (%0d,%0d): ORA (%0d,%0d) = %b expected %b",
                   s, sch, rot, m.name(), fr, fc, r, c, ora_fail[r][c], exp[r][c]);
        end
        if (exp[r][c] && ora_fail[r][c]) detections++;
      end
    // shift every column (rotated: every row) out
    shift = 1'b1;
    for (int k = N - 1; k >= 0; k--) begin
      for (int i = 0; i < N; i++) begin
        checks++;
        if (scan_out[i] !== (rot ? exp[i][k] : exp[k][i])) begin
          failures++;
          $display("shift chain %0d position %0d = %b", i, k, scan_out[i]);
        end
      end
      @(posedge clk); #1;
    end
    shift = 1'b0;
  endtask

  initial begin
    but_fault_t f;
    int r, c, want;
    shift = 1'b0; run = 1'b0; session = 1'b0; scheme = 1'b0; rotate = 1'b0; mode = BUT_FGEN1R;
    cfg_init = 1'b1; tpg_rst = 1'b1; ora_rst = 1'b1;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) fault[i][j] = '0;
    #12;
    // fault-free: every session, mode and scheme
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < NUM_BUT_MODES; m++)
        for (int sch = 0; sch < 2; sch++)
          for (int rot = 0; rot < 2; rot++)
            run_config(1'(s), 1'(sch), but_mode_e'(m), -1, 0, 0, 0, '0, 1'(rot));
    // one defective BUT per configuration
    want = 0;
    for (int k = 0; k < 32; k++) begin
      automatic bit s = k[0];
      automatic bit sch = k[1];
      automatic bit rot = k[4];
      but_mode_e m;
      if (rot) begin
        c = $urandom_range(0, N - 1);
        do r = $urandom_range(0, N - 1); while (!is_but(s, r));
      end else begin
        r = $urandom_range(0, N - 1);
        do c = $urandom_range(0, N - 1); while (!is_but(s, c));
      end
      f = '0;
      case (k % 4)
        0: begin f.x_sa_en = 1'b1; f.sa_val = k[2]; m = BUT_FGEN1R; end
        1: begin f.y_sa_en = 1'b1; f.sa_val = k[3]; m = BUT_MGEN; end
        2: begin f.x_sa_en = 1'b1; f.sa_val = 1'b1; m = BUT_FGEN2F; end
        default: begin f.lut_flip_en = 1'b1; f.lut_bit = 4'(k); m = BUT_FGEN1; end
      endcase
      run_config(s, sch, m, r, c, f.x_sa_en | f.lut_flip_en, f.y_sa_en | f.lut_flip_en, f, rot);
    end
    checks++;
    if (detections == 0) begin
      failures++;
      $display("no defect was ever detected");
    end
    $display("configurations run %0d, defective outputs detected %0d", configs, detections);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
