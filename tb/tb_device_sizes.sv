// tb_device_sizes: runs all ten logic BIST configurations and the three RAM
// BIST configurations at the array sizes of the three smaller devices of the
// family, 16 x 16, 24 x 24 and 32 x 32 cells (16, 36 and 64 RAMs); the
// 48 x 48 size is covered by tb_at40k_bist_top_full.
module tb_device_sizes;
  logic clk = 1'b0;
  logic fin16, fin24, fin32;
  int   c16, c24, c32, f16, f24, f32;
  int   checks = 0, failures = 0;

  bist_size_run #(.N(16)) u16 (.clk, .finished(fin16), .checks(c16), .failures(f16));
  bist_size_run #(.N(24)) u24 (.clk, .finished(fin24), .checks(c24), .failures(f24));
  bist_size_run #(.N(32)) u32 (.clk, .finished(fin32), .checks(c32), .failures(f32));

  always #5 clk = ~clk;

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c24 + c32, f16 + f24 + f32 + 1);
    $finish;
  end

  initial begin
    #1 wait (fin16 && fin24 && fin32);
    checks = c16 + c24 + c32;
    failures = f16 + f24 + f32;
    $display("16x16: %0d checks, 24x24: %0d checks, 32x32: %0d checks", c16, c24, c32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
