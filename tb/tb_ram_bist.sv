// tb_ram_bist: a 2 x 4 RAM grid under each of the three RAM BIST algorithms,
// fault-free and with one stuck storage cell. It checks the run time, that
// exactly the expected ORAs fail (the faulty RAM's bit in the single-port
// tests; the faulty RAM's and its ring predecessor's bit in the dual-port
// test; nothing in the dual-port test for a rightmost-column RAM) and that
// shifting the chain out returns the same flags in order.
module tb_ram_bist;
  import bist_pkg::*;

  localparam int R = 2, C = 4, NRAM = R * C, NORA = NRAM * 4;

  logic       clk = 1'b0;
  logic       rst, start, shift;
  ram_alg_e   alg;
  ram_fault_t fault [NRAM];
  logic       busy, done, scan_out;
  logic [3:0] ora_fail [NRAM];
  int         checks = 0, failures = 0;
  int         detected = 0;

  ram_bist #(.RAM_ROWS(R), .RAM_COLS(C)) dut (
    .clk, .rst, .start, .alg, .shift, .scan_in(1'b0), .fault, .busy, .done,
    .scan_out, .ora_fail
  );

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one algorithm with at most one faulty RAM fk (-1: none)
  task automatic run(ram_alg_e a, int fk, int fbit, int faddr, bit fval, int exp_cycles);
    bit exp_flag [NORA];
    int cycles = 0;
    int fr, fc, prev;
    for (int k = 0; k < NRAM; k++) fault[k] = '0;
    for (int j = 0; j < NORA; j++) exp_flag[j] = 1'b0;
    if (fk >= 0) begin
      fault[fk] = '{en: 1'b1, addr: 5'(faddr), bit_idx: 2'(fbit), val: fval};
      fr = fk / C; fc = fk % C;
      if (a != ALG_DPR) exp_flag[fk * 4 + fbit] = 1'b1;
      else if (fc != C - 1) begin
        prev = (fc + (C - 1) - 1) % (C - 1);         // ring predecessor
        exp_flag[fk * 4 + fbit] = 1'b1;
        exp_flag[(fr * C + prev) * 4 + fbit] = 1'b1;
      end
    end
    alg = a; shift = 1'b0;
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    start = 1'b1; @(posedge clk); #1 start = 1'b0;
    while (busy) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("%s: %0d cycles, expected %0d", a.name(), cycles, exp_cycles);
    end
    for (int j = 0; j < NORA; j++) begin
      checks++;
      if (ora_fail[j / 4][j % 4] !== exp_flag[j]) begin
        failures++;
        $display("%s fault RAM %0d: ORA %0d = %b expected %b", a.name(), fk, j,
                 ora_fail[j / 4][j % 4], exp_flag[j]);
      end
      if (exp_flag[j] && ora_fail[j / 4][j % 4]) detected++;
    end
    // shift out: the highest index comes first
    shift = 1'b1;
    for (int j = NORA - 1; j >= 0; j--) begin
      checks++;
      if (scan_out !== exp_flag[j]) begin
        failures++;
        $display("%s shift position %0d = %b", a.name(), j, scan_out);
      end
      @(posedge clk); #1;
    end
    shift = 1'b0;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; shift = 1'b0; alg = ALG_DPR;
    for (int k = 0; k < NRAM; k++) fault[k] = '0;
    #12;
    run(ALG_DPR,          -1, 0, 0, 1'b0, 128);
    run(ALG_MARCH_LR_BDS, -1, 0, 0, 1'b0, 960);
    run(ALG_MARCH_Y,      -1, 0, 0, 1'b0, 512);
    run(ALG_DPR,           1, 2, 5, 1'b0, 128);
    run(ALG_DPR,           6, 1, 20, 1'b1, 128);
    run(ALG_DPR,           3, 0, 7, 1'b1, 128);   // single-port-only RAM: not in this test
    run(ALG_MARCH_LR_BDS,  1, 2, 5, 1'b0, 960);
    run(ALG_MARCH_LR_BDS,  7, 3, 30, 1'b1, 960);
    run(ALG_MARCH_Y,       3, 0, 17, 1'b0, 512);
    run(ALG_MARCH_Y,       4, 1, 0, 1'b1, 512);
    checks++;
    if (detected != 2 + 2 + 1 + 1 + 1 + 1) begin
      failures++;
      $display("detected %0d faults", detected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
