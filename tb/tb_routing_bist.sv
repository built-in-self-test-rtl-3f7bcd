// tb_routing_bist: a routing BIST configuration with six WUT sets, run over
// a fault-free wiring model and over wiring with one defect at a time: a wire
// stuck at 0 or 1, an open (the wire holds its old value), a short inside a
// set and a short between wires of two neighbouring sets (wired-AND). It
// checks which ORAs fail.
module tb_routing_bist;
  localparam int NS = 6;

  logic       clk = 1'b0;
  logic       rst, run;
  logic [2:0] wut_tx [NS];
  logic [2:0] wut_rx [NS];
  logic       fail [NS];
  logic       any_fail;
  int         checks = 0, failures = 0;

  // defect selection for the wiring model
  int         kind;    // 0 none, 1 stuck-at, 2 open, 3 short in set, 4 short between sets
  int         fset, fwire, fwire2;
  bit         fval;
  logic [2:0] held;

  routing_bist #(.NSETS(NS)) dut (.clk, .rst, .run, .wut_tx, .wut_rx, .fail, .any_fail);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) held <= 3'b000;  // an open wire floats to a constant level

  always_comb begin
    for (int i = 0; i < NS; i++) wut_rx[i] = wut_tx[i];
    case (kind)
      1: wut_rx[fset][fwire] = fval;
      2: wut_rx[fset][fwire] = held[fwire];
      3: begin
        wut_rx[fset][fwire]  = wut_tx[fset][fwire] & wut_tx[fset][fwire2];
        wut_rx[fset][fwire2] = wut_tx[fset][fwire] & wut_tx[fset][fwire2];
      end
      4: begin
        wut_rx[fset][fwire]     = wut_tx[fset][fwire] & wut_tx[fset + 1][fwire];
        wut_rx[fset + 1][fwire] = wut_tx[fset][fwire] & wut_tx[fset + 1][fwire];
      end
      default: ;
    endcase
  end

  task automatic session(int k, int s, int w, int w2, bit v, bit exp_fail [NS]);
    kind = k; fset = s; fwire = w; fwire2 = w2; fval = v;
    rst = 1'b1; run = 1'b0;
    @(posedge clk); #1 rst = 1'b0; run = 1'b1;
    repeat (9) @(posedge clk);
    #1 run = 1'b0;
    for (int i = 0; i < NS; i++) begin
      checks++;
      if (fail[i] !== exp_fail[i]) begin
        failures++;
        $display("defect %0d set %0d wire %0d: ORA %0d = %b expected %b",
                 k, s, w, i, fail[i], exp_fail[i]);
      end
    end
    checks++;
    if (any_fail !== (k != 0)) failures++;
  endtask

  initial begin
    bit e [NS];
    kind = 0; fset = 0; fwire = 0; fwire2 = 1; fval = 0;
    for (int i = 0; i < NS; i++) e[i] = 1'b0;
    session(0, 0, 0, 1, 1'b0, e);                       // fault-free
    for (int s = 0; s < NS; s++)
      for (int w = 0; w < 3; w++)
        for (int v = 0; v < 2; v++) begin
          for (int i = 0; i < NS; i++) e[i] = (i == s);
          session(1, s, w, 0, 1'(v), e);                // stuck-at
        end
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < NS; i++) e[i] = (i == s);
      session(2, s, s % 3, 0, 1'b0, e);                 // open
      session(3, s, 0, 2, 1'b0, e);                     // short within a set
    end
    // short between the same wire of set s (up/even) and set s+1 (down/odd):
    // at least one of the two sets must see a parity error
    for (int s = 0; s < NS - 1; s += 2) begin
      kind = 4; fset = s; fwire = 1;
      rst = 1'b1; run = 1'b0;
      @(posedge clk); #1 rst = 1'b0; run = 1'b1;
      repeat (9) @(posedge clk);
      #1 run = 1'b0;
      checks++;
      if (!(fail[s] || fail[s + 1])) begin
        failures++;
        $display("short between sets %0d and %0d missed", s, s + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
