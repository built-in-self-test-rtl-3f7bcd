// bist_ora: one-cell comparison output response analyzer (ORA).
//
// In compare mode (shift = 0) the cell compares two responses, a and b, and
// sets its fail flag on the first clock at which they differ while cmp_en is
// high; the flag then holds through its own feedback until rst. When the
// test is over the same cell is switched to shift mode (shift = 1), which
// stands for the partial reconfiguration of the cell into a shift-register
// stage without disturbing its flip-flop: on each clock it then loads
// scan_in, so a column of ORAs moves its flags out one per clock through
// scan_out (= fail).
//
// Timing: a and b are sampled at the rising edge of clk; fail changes right
// after it. rst is asynchronous, active high.
//
// The compare-and-latch function and its reuse as a shift stage follow the
// document's single-cell ORA. The cmp_en qualifier, which the RAM BIST uses
// to ignore write cycles, is this design's own (it is tied high in the logic
// BIST).
module bist_ora (
  input  logic clk,
  input  logic rst,
  input  logic shift,
  input  logic cmp_en,
  input  logic a,
  input  logic b,
  input  logic scan_in,
  output logic fail
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        fail <= 1'b0;
    else if (shift) fail <= scan_in;
    else            fail <= fail | (cmp_en & (a ^ b));
  end

endmodule
