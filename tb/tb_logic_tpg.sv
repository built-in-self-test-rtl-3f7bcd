// tb_logic_tpg: checks the 5-bit logic BIST counter against a software count,
// including hold while disabled and the wrap from 31 to 0.
module tb_logic_tpg;
  logic       clk = 1'b0;
  logic       rst, en;
  logic [4:0] count;
  int         checks = 0, failures = 0;
  int         model;

  logic_tpg dut (.clk, .rst, .en, .count);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    checks++; if (count !== 5'd0) failures++;
    model = 0;
    for (int i = 0; i < 100; i++) begin
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) model = (model + 1) % 32;
      checks++;
      if (count !== model[4:0]) begin
        failures++;
        $display("count %0d expected %0d", count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
