// tb_ram_bist_tpg: runs the three RAM test algorithms and checks, against
// per-word operation counts and address orders worked out by hand from the
// algorithm definitions, the number of cycles, reads and writes, the address
// orders and the data; a behavioural memory driven by the TPG must also
// return the expected data on every single-port read.
module tb_ram_bist_tpg;
  import bist_pkg::*;

  logic       clk = 1'b0;
  logic       rst, start;
  ram_alg_e   alg;
  logic       busy, done, sync_mode, dual_port, we, cmp_en;
  logic [4:0] waddr, raddr;
  logic [3:0] wdata, expected;
  logic [3:0] mem [32];
  int         checks = 0, failures = 0;

  ram_bist_tpg dut (.clk, .rst, .start, .alg, .busy, .done, .sync_mode, .dual_port,
                    .waddr, .raddr, .wdata, .expected, .we, .cmp_en);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(ram_alg_e a, int exp_cycles, int exp_reads, int exp_writes,
                     bit exp_sync, bit exp_dp);
    int cycles = 0, reads = 0, writes = 0, bad_data = 0, bad_dpr = 0;
    int first_w [$];
    alg = a;
    @(posedge clk); #1 start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    check_eq(int'(busy), 1, "busy after start");
    check_eq(int'(sync_mode), int'(exp_sync), "sync_mode");
    check_eq(int'(dual_port), int'(exp_dp), "dual_port");
    while (busy) begin
      if (cmp_en) begin
        reads++;
        if (!exp_dp && mem[waddr] !== expected) bad_data++;
        if (exp_dp && we && (waddr + raddr != 31)) bad_dpr++;
      end
      if (we) begin
        writes++;
        if (first_w.size() < 32) first_w.push_back(int'(waddr));
      end
      if (sync_mode) begin
        @(posedge clk);
        if (we) mem[waddr] = wdata;
        #1;
      end else begin
        @(posedge clk); #1;
        if (we) mem[waddr] = wdata;
      end
      cycles++;
    end
    check_eq(cycles, exp_cycles, {a.name(), " cycles"});
    check_eq(reads, exp_reads, {a.name(), " reads"});
    check_eq(writes, exp_writes, {a.name(), " writes"});
    check_eq(bad_data, 0, {a.name(), " read data"});
    check_eq(bad_dpr, 0, {a.name(), " opposite address orders"});
    check_eq(int'(done), 1, "done");
    // the first element writes every word once, ascending
    for (int i = 0; i < 32; i++) check_eq(first_w[i], i, "first element order");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; alg = ALG_DPR;
    for (int i = 0; i < 32; i++) mem[i] = 4'($urandom);
    #12 rst = 1'b0;
    // DPR: 4 elements of one step: writes in 0,2,3, reads in 1,2,3
    run(ALG_DPR, 4 * 32, 3 * 32, 3 * 32, 1'b1, 1'b1);
    // March-LR with BDS: 30 operations per word, 17 reads and 13 writes
    run(ALG_MARCH_LR_BDS, 30 * 32, 17 * 32, 13 * 32, 1'b1, 1'b0);
    // March-Y: 8 operations per word (5 reads, 3 writes), two clocks each
    run(ALG_MARCH_Y, 2 * 8 * 32, 5 * 32, 3 * 32, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
