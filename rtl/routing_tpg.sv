// routing_tpg: test pattern generator of the routing BIST.
//
// A 2-bit counter plus a parity bit over the count; the three bits are sent
// as the test pattern over a set of three wires under test (WUTs). With
// DOWN = 0 the counter counts up and the parity bit makes the pattern's
// parity even; with DOWN = 1 it counts down and the parity is odd. Over the
// four counts every pair of the three pattern bits takes both the values
// (0,1) and (1,0), which exposes shorts between any two WUTs.
//
// pattern = {parity, cnt[1], cnt[0]}, registered; it advances on every rising
// clock edge while en is high; rst (active high, asynchronous) clears the
// counter.
//
// Counter width, directions and parity types follow the document; reset and
// enable are this design's choice.
module routing_tpg #(
  parameter bit DOWN = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic [2:0] pattern
);

  logic [1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     cnt <= '0;
    else if (en) cnt <= DOWN ? cnt - 2'd1 : cnt + 2'd1;
  end

  // even parity: p = c1 ^ c0; odd parity: p = ~(c1 ^ c0)
  assign pattern = {(cnt[1] ^ cnt[0]) ^ DOWN, cnt};

endmodule
