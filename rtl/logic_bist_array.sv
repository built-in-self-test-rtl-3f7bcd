// logic_bist_array: logic BIST configuration of an N x N array of logic cells.
//
// Cells are arranged in alternating columns of blocks under test (BUTs,
// plb_but) and comparison ORAs (bist_ora). Two identical 5-bit counter TPGs
// (logic_tpg) feed the BUT columns in turn: BUT column k (counted from the
// left, k = c/2) takes TPG A when k is even and TPG B when k is odd, so every
// ORA compares two BUTs fed by different TPGs and a TPG fault shows as well.
// All BUTs are configured in the same mode. Rows are paired (0-1, 2-3, ...);
// the ORA at (r, c) compares one BUT of its own row with one of the partner
// row p = r ^ 1:
//
//   scheme 0 (routing scheme 1): X output of BUT (p, c-1) against the
//                                Y output of BUT (r, c+1)
//   scheme 1 (routing scheme 2): Y output of BUT (r, c-1) against the
//                                X output of BUT (p, c+1)
//
// so that over two configurations both outputs of every BUT are observed.
// The session input flips the roles of the columns:
//
//   session 0 (session 1): column 0 holds the TPGs, odd columns are BUTs,
//                          even columns 2..N-2 are ORAs.
//   session 1 (session 2): column N-1 holds the TPGs, even columns 0..N-2
//                          are BUTs, odd columns 1..N-3 are ORAs.
//
// Between the two sessions every cell column has been a BUT once. N must be
// even. Cells that are neither BUT nor ORA in a session keep their ORA flag
// cleared.
//
// rotate = 1 turns the whole arrangement by 90 degrees: rows take the roles
// of columns (row 0 holds the TPGs in session 1, row N-1 in session 2), the
// ORA at (r, c) compares BUTs in rows r-1 and r+1, columns are paired
// (0-1, 2-3, ...) for the X connections, and the shift chains run along the
// rows. The rotated configurations exercise the horizontal bus connections
// of the cells. Because clocks and resets are distributed per column bank,
// rotated configurations should use modes whose BUT reset is not needed
// (the model itself does not share resets between cells).
//
// Operation: hold cfg_init, tpg_rst and ora_rst (all active high) for a
// clock (the configuration load), release them and raise run for at least
// 32 clocks (the TPG's full count; more for the sequential modes). ORAs
// compare at every rising edge. Then raise shift: each ORA column is a shift
// register from row 0 up to row N-1, and scan_out[c] gives the flag of row
// N-1 first, then of row N-2, and so on, one per clock. When rotated, each
// ORA row shifts from column 0 to column N-1 and scan_out[r] gives column
// N-1 first. ora_fail gives the same flags in parallel; fault injects
// emulated BUT defects. The four corner cells are an ORA in no
// configuration, so their ora_fail bits, and scan_out[0] and scan_out[N-1]
// which end in a corner, are always 0.
//
// The column arrangement, the two sessions, the counter TPGs, the
// alternating X/Y routing schemes, the reconfigured shift chain and the
// 90-degree rotation follow the document. The use of two TPGs, their
// assignment to BUT columns, the row (or column) pairing and the chain
// direction when rotated are this design's reading of its figures.
module logic_bist_array
  import bist_pkg::*;
#(
  parameter int unsigned N = 48
) (
  input  logic       clk,
  input  logic       cfg_init,
  input  logic       tpg_rst,
  input  logic       ora_rst,
  input  logic       run,
  input  logic       session,
  input  logic       scheme,
  input  logic       rotate,
  input  but_mode_e  mode,
  input  logic       shift,
  input  but_fault_t fault    [N][N],
  output logic       ora_fail [N][N],
  output logic       scan_out [N]
);

  logic [4:0] cnt_a, cnt_b;
  logic       bx [N][N];
  logic       by [N][N];

  logic_tpg #(.WIDTH(5)) u_tpg_a (.clk, .rst(tpg_rst), .en(run), .count(cnt_a));
  logic_tpg #(.WIDTH(5)) u_tpg_b (.clk, .rst(tpg_rst), .en(run), .count(cnt_b));

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      // column-oriented (rotate = 0) and row-oriented (rotate = 1) roles
      localparam bit          ODD_COL = (c % 2) == 1;
      localparam bit          ODD_ROW = (r % 2) == 1;
      localparam bit          USE_B_C = ((c / 2) % 2) == 1;
      localparam bit          USE_B_R = ((r / 2) % 2) == 1;
      localparam int unsigned PR      = r ^ 1;  // partner row
      localparam int unsigned PC      = c ^ 1;  // partner column

      logic is_ora_c, is_ora_r, is_ora;
      logic oa_c, ob_c, oa_r, ob_r, oa, ob;
      logic chain_in;

      assign is_ora_c = session ? (ODD_COL && c != N - 1) : (!ODD_COL && c != 0);
      assign is_ora_r = session ? (ODD_ROW && r != N - 1) : (!ODD_ROW && r != 0);
      assign is_ora   = rotate ? is_ora_r : is_ora_c;

      plb_but u_but (
        .clk, .cfg_init, .mode,
        .in((rotate ? USE_B_R : USE_B_C) ? cnt_b : cnt_a),
        .fault(fault[r][c]),
        .x(bx[r][c]), .y(by[r][c])
      );

      if (c > 0 && c < N - 1) begin : g_inner_c
        assign oa_c = scheme ? by[r][c-1] : bx[PR][c-1];
        assign ob_c = scheme ? bx[PR][c+1] : by[r][c+1];
      end else begin : g_edge_c
        assign oa_c = 1'b0;
        assign ob_c = 1'b0;
      end

      if (r > 0 && r < N - 1) begin : g_inner_r
        assign oa_r = scheme ? by[r-1][c] : bx[r-1][PC];
        assign ob_r = scheme ? bx[r+1][PC] : by[r+1][c];
      end else begin : g_edge_r
        assign oa_r = 1'b0;
        assign ob_r = 1'b0;
      end

      assign oa = rotate ? oa_r : oa_c;
      assign ob = rotate ? ob_r : ob_c;

      // shift chains run up the columns, or along the rows when rotated
      if (r == 0 && c == 0) begin : g_chain_corner
        assign chain_in = 1'b0;
      end else if (r == 0) begin : g_chain_bottom
        assign chain_in = rotate ? ora_fail[r][c-1] : 1'b0;
      end else if (c == 0) begin : g_chain_left
        assign chain_in = rotate ? 1'b0 : ora_fail[r-1][c];
      end else begin : g_chain_inner
        assign chain_in = rotate ? ora_fail[r][c-1] : ora_fail[r-1][c];
      end

      bist_ora u_ora (
        .clk, .rst(ora_rst | ~is_ora), .shift, .cmp_en(1'b1),
        .a(oa), .b(ob), .scan_in(chain_in),
        .fail(ora_fail[r][c])
      );
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_scan
    assign scan_out[i] = rotate ? ora_fail[i][N-1] : ora_fail[N-1][i];
  end

  initial begin
    assert (N >= 4 && N % 2 == 0) else $error("logic_bist_array: N must be even and >= 4");
  end

endmodule
