// bist_pkg: types and constant tables shared by the AT40K BIST blocks.
//
// It holds three things. The five block-under-test (BUT) modes of the logic
// BIST (the dynamic macros FGEN1R, FGEN1, FGEN1RF, MGEN and FGEN2F) and the
// lookup-table contents each mode is given. The three RAM BIST algorithms
// (the dual-port "DPR" test, March-LR with background data sequences, March-Y
// without them) written as tables of March elements. And the fault-injection
// records used to emulate a defective logic cell or RAM cell in simulation.
//
// The mode list and the March sequences follow the document's tables. The LUT
// truth tables, the element encoding and the fault records are this design's
// own choices: the document names the macros but does not print their
// Boolean expressions.
package bist_pkg;

  // ---------------------------------------------------------------- logic BIST
  typedef enum logic [2:0] {
    BUT_FGEN1R  = 3'd0,  // 4-input LUT, rising-edge FF, active-high reset
    BUT_FGEN1   = 3'd1,  // 4-input LUT, combinational
    BUT_FGEN1RF = 3'd2,  // 4-input LUT, falling-edge FF with sequential feedback, active-low set
    BUT_MGEN    = 3'd3,  // multiplier-based LUTs
    BUT_FGEN2F  = 3'd4   // two 3-input LUTs with combinational feedback
  } but_mode_e;

  localparam int unsigned NUM_BUT_MODES = 5;

  // Truth table of the first 8x1 LUT (F) for each mode; bit i is the output
  // for LUT address i.
  function automatic logic [7:0] but_lut_f(but_mode_e m);
    case (m)
      BUT_FGEN1R:  return 8'h96;  // a^b^c
      BUT_FGEN1:   return 8'hD8;  // a ? b : c
      BUT_FGEN1RF: return 8'h6A;  // a ^ (b & c)
      BUT_MGEN:    return 8'h96;  // sum of partial product, addend, carry-in
      BUT_FGEN2F:  return 8'hCA;  // c ? b : a
      default:     return 8'h00;
    endcase
  endfunction

  // Truth table of the second 8x1 LUT (G).
  function automatic logic [7:0] but_lut_g(but_mode_e m);
    case (m)
      BUT_FGEN1R:  return 8'hE8;  // majority(a,b,c)
      BUT_FGEN1:   return 8'h69;  // ~(a^b^c)
      BUT_FGEN1RF: return 8'hB4;  // a table that depends on all three inputs
      BUT_MGEN:    return 8'hE8;  // carry of partial product, addend, carry-in
      BUT_FGEN2F:  return 8'h96;  // a^b^c
      default:     return 8'h00;
    endcase
  endfunction

  // Emulated defect of one logic cell: its X or Y output path stuck at a
  // value, and/or one LUT configuration bit inverted (lut_bit[3] picks G).
  typedef struct packed {
    logic       x_sa_en;
    logic       y_sa_en;
    logic       sa_val;
    logic       lut_flip_en;
    logic [3:0] lut_bit;
  } but_fault_t;

  // ------------------------------------------------------------------ RAM BIST
  localparam int unsigned RAM_WORDS = 32;
  localparam int unsigned RAM_AW    = 5;
  localparam int unsigned RAM_DW    = 4;

  typedef enum logic [1:0] {
    ALG_DPR          = 2'd0,  // synchronous dual-port: DPR test
    ALG_MARCH_LR_BDS = 2'd1,  // synchronous single-port: March-LR with BDS
    ALG_MARCH_Y      = 2'd2   // asynchronous single-port: March-Y without BDS
  } ram_alg_e;

  // One operation of a March element. On a single-port RAM exactly one of
  // wr/rd is set and both directions equal the element's. In the DPR test the
  // write port and the read port act in the same cycle with their own
  // address orders.
  typedef struct packed {
    logic              wr;
    logic              wr_down;
    logic              rd;
    logic              rd_down;
    logic [RAM_DW-1:0] data;  // write data, or expected read data
  } march_op_t;

  localparam int unsigned MAX_OPS = 5;

  typedef struct packed {
    logic [2:0]                nops;
    march_op_t [MAX_OPS-1:0]   ops;   // ops[0] is applied first
  } march_elem_t;

  function automatic march_op_t op_w(logic down, logic [RAM_DW-1:0] d);
    return '{wr: 1'b1, wr_down: down, rd: 1'b0, rd_down: down, data: d};
  endfunction

  function automatic march_op_t op_r(logic down, logic [RAM_DW-1:0] d);
    return '{wr: 1'b0, wr_down: down, rd: 1'b1, rd_down: down, data: d};
  endfunction

  function automatic march_elem_t elem1(march_op_t o0);
    march_elem_t e = '0;
    e.nops = 3'd1; e.ops[0] = o0;
    return e;
  endfunction

  function automatic march_elem_t elem2(march_op_t o0, march_op_t o1);
    march_elem_t e = '0;
    e.nops = 3'd2; e.ops[0] = o0; e.ops[1] = o1;
    return e;
  endfunction

  function automatic march_elem_t elem3(march_op_t o0, march_op_t o1, march_op_t o2);
    march_elem_t e = '0;
    e.nops = 3'd3; e.ops[0] = o0; e.ops[1] = o1; e.ops[2] = o2;
    return e;
  endfunction

  function automatic march_elem_t elem4(march_op_t o0, march_op_t o1, march_op_t o2,
                                        march_op_t o3);
    march_elem_t e = '0;
    e.nops = 3'd4; e.ops[0] = o0; e.ops[1] = o1; e.ops[2] = o2; e.ops[3] = o3;
    return e;
  endfunction

  function automatic march_elem_t elem5(march_op_t o0, march_op_t o1, march_op_t o2,
                                        march_op_t o3, march_op_t o4);
    march_elem_t e = '0;
    e.nops = 3'd5; e.ops[0] = o0; e.ops[1] = o1; e.ops[2] = o2; e.ops[3] = o3;
    e.ops[4] = o4;
    return e;
  endfunction

  localparam logic UP = 1'b0;
  localparam logic DN = 1'b1;

  // Number of March elements of an algorithm.
  function automatic int unsigned march_len(ram_alg_e a);
    case (a)
      ALG_DPR:          return 4;
      ALG_MARCH_LR_BDS: return 10;
      ALG_MARCH_Y:      return 4;
      default:          return 0;
    endcase
  endfunction

  // Element idx of algorithm a. "Either direction" elements run ascending.
  function automatic march_elem_t march_elem(ram_alg_e a, int unsigned idx);
    march_elem_t e = '0;
    case (a)
      ALG_DPR: begin
        // (w0:n); down(n:r0); up(w1 : down r1); down(w0 : up r0)
        case (idx)
          0: e = elem1('{wr: 1'b1, wr_down: UP, rd: 1'b0, rd_down: UP, data: 4'h0});
          1: e = elem1('{wr: 1'b0, wr_down: DN, rd: 1'b1, rd_down: DN, data: 4'h0});
          2: e = elem1('{wr: 1'b1, wr_down: UP, rd: 1'b1, rd_down: DN, data: 4'hF});
          3: e = elem1('{wr: 1'b1, wr_down: DN, rd: 1'b1, rd_down: UP, data: 4'h0});
          default: e = '0;
        endcase
      end
      ALG_MARCH_LR_BDS: begin
        case (idx)
          0: e = elem1(op_w(UP, 4'b0000));
          1: e = elem2(op_r(DN, 4'b0000), op_w(DN, 4'b1111));
          2: e = elem5(op_r(UP, 4'b1111), op_w(UP, 4'b0000), op_r(UP, 4'b0000),
                       op_r(UP, 4'b0000), op_w(UP, 4'b1111));
          3: e = elem2(op_r(UP, 4'b1111), op_w(UP, 4'b0000));
          4: e = elem5(op_r(UP, 4'b0000), op_w(UP, 4'b1111), op_r(UP, 4'b1111),
                       op_r(UP, 4'b1111), op_w(UP, 4'b0000));
          5: e = elem4(op_r(UP, 4'b0000), op_w(UP, 4'b0101), op_w(UP, 4'b1010),
                       op_r(UP, 4'b1010));
          6: e = elem3(op_r(DN, 4'b1010), op_w(DN, 4'b0101), op_r(DN, 4'b0101));
          7: e = elem4(op_r(UP, 4'b0101), op_w(UP, 4'b0011), op_w(UP, 4'b1100),
                       op_r(UP, 4'b1100));
          8: e = elem3(op_r(DN, 4'b1100), op_w(DN, 4'b0011), op_r(DN, 4'b0011));
          9: e = elem1(op_r(UP, 4'b0011));
          default: e = '0;
        endcase
      end
      ALG_MARCH_Y: begin
        case (idx)
          0: e = elem1(op_w(UP, 4'h0));
          1: e = elem3(op_r(UP, 4'h0), op_w(UP, 4'hF), op_r(UP, 4'hF));
          2: e = elem3(op_r(DN, 4'hF), op_w(DN, 4'h0), op_r(DN, 4'h0));
          3: e = elem1(op_r(UP, 4'h0));
          default: e = '0;
        endcase
      end
      default: e = '0;
    endcase
    return e;
  endfunction

  // Emulated defect of one RAM: a single storage cell stuck at a value.
  typedef struct packed {
    logic              en;
    logic [RAM_AW-1:0] addr;
    logic [1:0]        bit_idx;
    logic              val;
  } ram_fault_t;

endpackage
