// routing_ora: parity-checking output response analyzer of the routing BIST.
//
// It receives the three bits that came over one set of wires under test and
// checks their parity: exclusive-OR for the even-parity (up-count) TPG,
// exclusive-NOR for the odd-parity (down-count) TPG, chosen by ODD. A parity
// error sets the flip-flop, whose output is fed back through an OR so that
// the error stays latched; fail is the pass/fail output (1 = fail).
//
// Timing: wut is sampled at the rising edge of clk while en is high; rst is
// asynchronous, active high.
//
// Function and structure follow the document; en and the reset are this
// design's choice.
module routing_ora #(
  parameter bit ODD = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [2:0] wut,
  output logic       fail
);

  logic err;

  assign err = (^wut) ^ ODD;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) fail <= 1'b0;
    else     fail <= fail | (en & err);
  end

endmodule
