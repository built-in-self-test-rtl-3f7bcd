// tb_bist_ora: drives the comparison ORA with random responses and checks the
// latched flag against a reference, then checks shift mode loads scan_in.
module tb_bist_ora;
  logic clk = 1'b0;
  logic rst, shift, cmp_en, a, b, scan_in, fail;
  int   checks = 0, failures = 0;
  logic model;

  bist_ora dut (.clk, .rst, .shift, .cmp_en, .a, .b, .scan_in, .fail);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; shift = 1'b0; cmp_en = 1'b0; a = 1'b0; b = 1'b0; scan_in = 1'b0;
    #12 rst = 1'b0;
    for (int round = 0; round < 6; round++) begin
      rst = 1'b1; #1 rst = 1'b0;
      model = 1'b0;
      checks++; if (fail !== 1'b0) failures++;
      // compare phase: mostly equal inputs, one mismatch in some rounds
      for (int i = 0; i < 20; i++) begin
        a = 1'($urandom_range(0, 1));
        cmp_en = 1'($urandom_range(0, 1));
        b = (round >= 2 && i == 7 + round) ? ~a : a;
        if (round == 5 && i == 3) b = ~a;
        @(posedge clk); #1;
        if (cmp_en && (a != b)) model = 1'b1;
        checks++;
        if (fail !== model) begin
          failures++;
          $display("round %0d step %0d fail=%0b expected %0b", round, i, fail, model);
        end
      end
      // shift phase
      shift = 1'b1;
      for (int i = 0; i < 4; i++) begin
        scan_in = 1'($urandom_range(0, 1));
        a = 1'b0; b = 1'b1; cmp_en = 1'b1;  // compare inputs must be ignored
        @(posedge clk); #1;
        checks++;
        if (fail !== scan_in) failures++;
      end
      shift = 1'b0; cmp_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
