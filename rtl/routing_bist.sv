// routing_bist: one parity-based routing BIST configuration.
//
// Two TPGs, an up-counter with even parity and a down-counter with odd
// parity, each drive many sets of three wires under test (WUTs); every set
// ends in a parity ORA of the matching type. Sets alternate between the two
// TPGs (even-numbered sets: up/even, odd-numbered sets: down/odd), so that
// neighbouring WUT sets carry different patterns and a short or a stuck-on
// switch between two sets disturbs the parity of at least one of them.
//
// The WUTs themselves are the FPGA's programmable wiring (wire segments,
// switches, repeaters, express-bus cross-points), which has no logic of its
// own: wut_tx[i] is what set i is driven with, wut_rx[i] what arrives at its
// ORA. Connect them directly for a fault-free fabric, or through a fault
// model. fail[i] is ORA i's latched flag and any_fail their OR.
//
// Timing: patterns change after each rising edge while run is high; the ORAs
// sample wut_rx at the rising edge, so the wires are a single-cycle path.
// The ORAs compare from the second run cycle on (en delayed by one clock)
// so that nothing is judged before the first pattern has been sent.
//
// TPG and ORA types and the alternation follow the document. The number of
// sets per configuration, NSETS, and the one-cycle start delay are this
// design's choice.
module routing_bist #(
  parameter int unsigned NSETS = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       run,
  output logic [2:0] wut_tx [NSETS],
  input  logic [2:0] wut_rx [NSETS],
  output logic       fail   [NSETS],
  output logic       any_fail
);

  logic [2:0] pat_up, pat_dn;
  logic       ora_en;

  routing_tpg #(.DOWN(1'b0)) u_tpg_up (.clk, .rst, .en(run), .pattern(pat_up));
  routing_tpg #(.DOWN(1'b1)) u_tpg_dn (.clk, .rst, .en(run), .pattern(pat_dn));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) ora_en <= 1'b0;
    else     ora_en <= run;
  end

  for (genvar i = 0; i < NSETS; i++) begin : g_set
    localparam bit ODD = (i % 2) == 1;
    assign wut_tx[i] = ODD ? pat_dn : pat_up;
    routing_ora #(.ODD(ODD)) u_ora (
      .clk, .rst, .en(ora_en), .wut(wut_rx[i]), .fail(fail[i])
    );
  end

  always_comb begin
    any_fail = 1'b0;
    for (int i = 0; i < NSETS; i++) any_fail |= fail[i];
  end

endmodule
