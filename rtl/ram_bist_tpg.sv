// ram_bist_tpg: the single test pattern generator of the RAM BIST.
//
// It applies one of three March-type algorithms to all free RAMs at once,
// producing the write address, read address, write data, write strobe and
// the expected read data, plus cmp_en, which marks the cycles in which the
// ORAs must compare a read result. The algorithms are tables of March
// elements in bist_pkg:
//
//   ALG_DPR           synchronous dual-port test, write and read port
//                     active in the same cycle with their own address orders
//   ALG_MARCH_LR_BDS  synchronous single-port March-LR with background data
//                     sequences (30 operations per word)
//   ALG_MARCH_Y       asynchronous single-port March-Y without background
//                     data (8 operations per word)
//
// A pulse on start (while idle) latches alg and begins the run; busy is high
// until the last operation, then done stays high until the next start. For
// every element, every one of the 32 addresses gets the element's operations
// in order. In synchronous mode each operation takes one clock: a write is
// stored at the clock edge ending the cycle, a read is compared at that
// edge. In asynchronous mode each operation takes two clocks: a setup cycle
// with we low, then a cycle with we high (writes) or cmp_en high (reads),
// so address and data are stable a full clock before the strobe rises.
// Cycle counts are therefore 4*32 = 128 (DPR), 30*32 = 960 (March-LR) and
// 2*8*32 = 512 (March-Y).
//
// The algorithms are the document's; the sequencing, the two-cycle
// asynchronous operation and the interface are this design's choice.
module ram_bist_tpg
  import bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  ram_alg_e          alg,
  output logic              busy,
  output logic              done,
  output logic              sync_mode,
  output logic              dual_port,
  output logic [RAM_AW-1:0] waddr,
  output logic [RAM_AW-1:0] raddr,
  output logic [RAM_DW-1:0] wdata,
  output logic [RAM_DW-1:0] expected,
  output logic              we,
  output logic              cmp_en
);

  ram_alg_e          alg_q;
  logic [3:0]        elem_idx;
  logic [2:0]        op_idx;
  logic [RAM_AW-1:0] word;
  logic              phase;
  march_elem_t       elem;
  march_op_t         op;
  logic              active_phase;

  assign elem         = march_elem(alg_q, 32'(elem_idx));
  assign op           = elem.ops[op_idx];
  assign sync_mode    = (alg_q != ALG_MARCH_Y);
  assign dual_port    = (alg_q == ALG_DPR);
  assign active_phase = sync_mode | phase;

  assign waddr    = op.wr_down ? ~word : word;
  assign raddr    = op.rd_down ? ~word : word;
  assign wdata    = op.data;
  assign expected = op.data;
  assign we       = busy & op.wr & active_phase;
  assign cmp_en   = busy & op.rd & active_phase;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      alg_q    <= ALG_DPR;
      busy     <= 1'b0;
      done     <= 1'b0;
      elem_idx <= '0;
      op_idx   <= '0;
      word     <= '0;
      phase    <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        alg_q    <= alg;
        busy     <= 1'b1;
        done     <= 1'b0;
        elem_idx <= '0;
        op_idx   <= '0;
        word     <= '0;
        phase    <= 1'b0;
      end
    end else if (!active_phase) begin
      phase <= 1'b1;
    end else begin
      phase <= 1'b0;
      if (op_idx + 3'd1 < elem.nops) begin
        op_idx <= op_idx + 3'd1;
      end else begin
        op_idx <= '0;
        word   <= word + 1'b1;
        if (word == '1) begin
          if (32'(elem_idx) + 1 < march_len(alg_q)) begin
            elem_idx <= elem_idx + 4'd1;
          end else begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
