// free_ram: one 32-word by 4-bit embedded RAM ("free RAM") of the AT40K array.
//
// One such RAM sits with every 4x4 group of logic cells. It runs in one of
// two port modes and two write modes, set by its configuration inputs:
//
//   dual_port = 1  a write port (waddr, din, we) and an independent read
//                  port (raddr, dout). Only RAMs with DP_CAPABLE = 1 have it;
//                  the RAMs of the rightmost column are single-port only.
//   dual_port = 0  single port: waddr is the one address for reads and
//                  writes. The shared bidirectional data bus of the real part
//                  (driven through a tri-state buffer) is split here into
//                  din and dout, since a two-state model has no high-impedance
//                  value.
//   sync_mode = 1  a write happens at the rising edge of clk while we is high.
//   sync_mode = 0  asynchronous write: we itself is the write strobe and the
//                  word is stored at its rising edge, so address and data must
//                  be stable before we rises and remain stable while it is high.
//
// Reading is always asynchronous: dout follows the read address without a
// clock. fault emulates a defective storage cell that always reads as a
// fixed value, for testing the BIST.
//
// Size, port modes and the asynchronous read follow the document; the
// single-edge model of the asynchronous write and the fault port are this
// design's choice. The write clock is selected between clk and we, which is
// intended: in asynchronous mode the strobe is the write clock.
module free_ram
  import bist_pkg::*;
#(
  parameter bit DP_CAPABLE = 1'b1
) (
  input  logic              clk,
  input  logic              sync_mode,
  input  logic              dual_port,
  input  logic              we,
  input  logic [RAM_AW-1:0] waddr,
  input  logic [RAM_AW-1:0] raddr,
  input  logic [RAM_DW-1:0] din,
  output logic [RAM_DW-1:0] dout,
  input  ram_fault_t        fault
);

  logic [RAM_DW-1:0] mem [RAM_WORDS];
  logic              wclk;
  logic [RAM_AW-1:0] rd_addr;
  logic [RAM_DW-1:0] rd_word;

  assign wclk = sync_mode ? clk : we;

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= din;
  end

  assign rd_addr = (DP_CAPABLE && dual_port) ? raddr : waddr;

  always_comb begin
    rd_word = mem[rd_addr];
    if (fault.en && fault.addr == rd_addr) rd_word[fault.bit_idx] = fault.val;
  end

  assign dout = rd_word;

endmodule
