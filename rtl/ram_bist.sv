// ram_bist: BIST configuration that tests all free RAMs of the array in parallel.
//
// One ram_bist_tpg drives the address, data and strobe inputs of every RAM
// (RAM_ROWS x RAM_COLS of them, one per 4x4 group of logic cells). Each RAM
// has four comparison ORAs (bist_ora), one per data bit:
//
//   single-port tests (March-LR with BDS, March-Y): each ORA compares one
//     bit of its RAM's read data with the expected bit from the TPG.
//   dual-port test (DPR): the RAMs of a row that have a dual-port mode (all
//     but the rightmost column) form a ring; each ORA compares a bit of its
//     RAM with the same bit of the next RAM of the ring. A faulty RAM then
//     fails the ORAs of two neighbouring ring positions. The ORAs of the
//     rightmost column are idle in this test.
//
// All ORAs form one shift register, RAM by RAM and bit by bit (ORA index
// j = 4*(row*RAM_COLS + col) + bit, scan_in enters at j = 0, scan_out is the
// last one). After done, raising shift moves the flags out one per clock,
// the highest index first; the position of a 1 names the failing RAM and
// data bit. ora_fail shows the same flags in parallel.
//
// rst (active high) clears TPG and ORAs; start begins the algorithm chosen
// by alg. Running times are those of ram_bist_tpg.
//
// The single shared TPG, the two ORA arrangements, the excluded rightmost
// column and the one shift chain follow the document. The ring pairing for
// the dual-port test and the chain order are this design's choice.
module ram_bist
  import bist_pkg::*;
#(
  parameter int unsigned RAM_ROWS = 12,
  parameter int unsigned RAM_COLS = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  ram_alg_e                 alg,
  input  logic                     shift,
  input  logic                     scan_in,
  input  ram_fault_t               fault    [RAM_ROWS*RAM_COLS],
  output logic                     busy,
  output logic                     done,
  output logic                     scan_out,
  output logic [RAM_DW-1:0]        ora_fail [RAM_ROWS*RAM_COLS]
);

  localparam int unsigned NRAM = RAM_ROWS * RAM_COLS;
  localparam int unsigned NORA = NRAM * RAM_DW;
  localparam int unsigned NDP  = RAM_COLS - 1;  // dual-port RAMs per row

  logic              sync_mode, dual_port, we, cmp_en;
  logic [RAM_AW-1:0] waddr, raddr;
  logic [RAM_DW-1:0] wdata, expected;
  logic [RAM_DW-1:0] dout  [NRAM];
  logic [NORA-1:0]   fail;

  ram_bist_tpg u_tpg (
    .clk, .rst, .start, .alg, .busy, .done, .sync_mode, .dual_port,
    .waddr, .raddr, .wdata, .expected, .we, .cmp_en
  );

  for (genvar r = 0; r < RAM_ROWS; r++) begin : g_row
    for (genvar c = 0; c < RAM_COLS; c++) begin : g_col
      localparam int unsigned K    = r * RAM_COLS + c;
      localparam bit          DP   = (c != RAM_COLS - 1);
      // ring neighbour among the dual-port RAMs of this row
      localparam int unsigned NEXT = r * RAM_COLS + ((c + 1) % NDP);

      free_ram #(.DP_CAPABLE(DP)) u_ram (
        .clk, .sync_mode, .dual_port, .we, .waddr, .raddr,
        .din(wdata), .dout(dout[K]), .fault(fault[K])
      );

      for (genvar b = 0; b < RAM_DW; b++) begin : g_bit
        localparam int unsigned J = K * RAM_DW + b;
        logic ref_bit, en;
        if (DP) begin : g_dp
          assign ref_bit = dual_port ? dout[NEXT][b] : expected[b];
          assign en      = cmp_en;
        end else begin : g_sp
          assign ref_bit = expected[b];
          assign en      = cmp_en & ~dual_port;
        end
        bist_ora u_ora (
          .clk, .rst, .shift, .cmp_en(en), .a(dout[K][b]), .b(ref_bit),
          .scan_in(J == 0 ? scan_in : fail[(J == 0) ? 0 : J - 1]),
          .fail(fail[J])
        );
        assign ora_fail[K][b] = fail[J];
      end
    end
  end

  assign scan_out = fail[NORA-1];

  initial begin
    assert (RAM_COLS >= 3) else $error("ram_bist: the dual-port ring needs RAM_COLS >= 3");
  end

endmodule
