// logic_tpg: test pattern generator of the logic BIST.
//
// A WIDTH-bit binary up-counter. With the default of five bits it drives the
// five inputs of every block under test it fans out to and cycles through all
// 32 input combinations, so each BUT sees an exhaustive pattern set every 32
// clocks. The counter is cleared by rst (active high, asynchronous) and then
// advances on every rising clock edge while en is high; count is the state
// itself, so a new pattern appears right after each edge.
//
// The counter and its width follow the document; enable and reset polarity
// are this design's choice.
module logic_tpg #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     count <= '0;
    else if (en) count <= count + 1'b1;
  end

endmodule
