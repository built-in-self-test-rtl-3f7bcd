// plb_but: one AT40K logic cell configured as a block under test (BUT).
//
// The cell holds two 8x1 lookup tables, F and G, and one D flip-flop. The
// mode input plays the role of the configuration downloaded for one of the
// five logic BIST sessions and picks how the LUTs and the flip-flop are
// used (LUT addresses are {c,b,a} with a the least significant bit):
//
//   FGEN1R   4-input LUT in[3] ? G(in[2:0]) : F(in[2:0]), registered on the
//            rising edge; in[4] is the active-high asynchronous reset.
//   FGEN1    the same 4-input LUT, combinational.
//   FGEN1RF  4-input LUT whose input in[2] is replaced by the flip-flop
//            output (sequential feedback), registered on the falling edge;
//            in[4] is the active-low asynchronous set.
//   MGEN     multiplier cell: partial product p = in[0] & in[1]; F gives the
//            sum and G the carry of p, in[2], in[3]; in[4] selects which one
//            is output.
//   FGEN2F   two 3-input LUTs with combinational feedback: G(t, in[3],
//            in[4]) with t = F(in[2:0]).
//
// The chosen function drives both cell outputs, X (to the diagonal
// neighbours) and Y (to the orthogonal neighbours), over separate output
// paths, so that an ORA can compare the X output of one BUT with the Y
// output of another. cfg_init stands for the flip-flop initialisation done
// when the configuration is loaded (reset, or set in FGEN1RF). fault injects
// an emulated defect: an output path stuck at a value or one inverted LUT
// bit. The LUT contents come from bist_pkg.
//
// The five modes and their LUT/flip-flop features follow the document's
// table of logic BIST configurations; how each macro maps the five inputs
// and the LUT contents are this design's choice. The cell's single flip-flop
// with selectable clock edge is modelled as two flops, of which a mode uses
// one.
module plb_but
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       cfg_init,
  input  but_mode_e  mode,
  input  logic [4:0] in,
  input  but_fault_t fault,
  output logic       x,
  output logic       y
);

  logic [7:0] lut_f, lut_g;
  logic       q_r, q_f;        // rising- and falling-edge flop
  logic       lut4_d, lut4_fb; // 4-LUT outputs, plain and with feedback
  logic       f_out;
  logic       rst_r, set_f;
  logic       pp;
  logic [2:0] m_addr;
  logic       t2;

  always_comb begin
    lut_f = but_lut_f(mode);
    lut_g = but_lut_g(mode);
    if (fault.lut_flip_en) begin
      if (fault.lut_bit[3]) lut_g[fault.lut_bit[2:0]] = ~lut_g[fault.lut_bit[2:0]];
      else                  lut_f[fault.lut_bit[2:0]] = ~lut_f[fault.lut_bit[2:0]];
    end
  end

  // 4-input LUT built from F, G and the in[3] select
  assign lut4_d  = in[3] ? lut_g[in[2:0]] : lut_f[in[2:0]];
  assign lut4_fb = in[3] ? lut_g[{q_f, in[1:0]}] : lut_f[{q_f, in[1:0]}];

  assign rst_r = cfg_init | ((mode == BUT_FGEN1R) & in[4]);
  assign set_f = cfg_init | ((mode == BUT_FGEN1RF) & ~in[4]);

  always_ff @(posedge clk or posedge rst_r) begin
    if (rst_r) q_r <= 1'b0;
    else       q_r <= lut4_d;
  end

  always_ff @(negedge clk or posedge set_f) begin
    if (set_f) q_f <= 1'b1;
    else       q_f <= lut4_fb;
  end

  assign pp     = in[0] & in[1];
  assign m_addr = {in[3], in[2], pp};
  assign t2     = lut_f[in[2:0]];

  always_comb begin
    case (mode)
      BUT_FGEN1R:  f_out = q_r;
      BUT_FGEN1:   f_out = lut4_d;
      BUT_FGEN1RF: f_out = q_f;
      BUT_MGEN:    f_out = in[4] ? lut_g[m_addr] : lut_f[m_addr];
      BUT_FGEN2F:  f_out = lut_g[{in[4], in[3], t2}];
      default:     f_out = 1'b0;
    endcase
  end

  assign x = fault.x_sa_en ? fault.sa_val : f_out;
  assign y = fault.y_sa_en ? fault.sa_val : f_out;

endmodule
