// tb_plb_but: checks the logic cell in each of its five BUT modes against a
// reference written from Boolean formulas (the LUT tables are rebuilt here
// from those formulas), with random inputs, and checks the injected defects:
// stuck X/Y output paths and an inverted LUT bit.
module tb_plb_but;
  import bist_pkg::*;

  logic       clk = 1'b0;
  logic       cfg_init;
  but_mode_e  mode;
  logic [4:0] in;
  but_fault_t fault;
  logic       x, y;
  int         checks = 0, failures = 0;

  logic [7:0] tf, tg;      // reference tables
  logic       rq_r, rq_f;  // reference flip-flops

  plb_but dut (.clk, .cfg_init, .mode, .in, .fault, .x, .y);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic fa(but_mode_e m, logic a, logic b, logic c);
    case (m)
      BUT_FGEN1R:  return a ^ b ^ c;
      BUT_FGEN1:   return a ? b : c;
      BUT_FGEN1RF: return a ^ (b & c);
      BUT_MGEN:    return a ^ b ^ c;
      default:     return c ? b : a;   // FGEN2F
    endcase
  endfunction

  function automatic logic ga(but_mode_e m, logic a, logic b, logic c);
    case (m)
      BUT_FGEN1R:  return (a & b) | (a & c) | (b & c);
      BUT_FGEN1:   return ~(a ^ b ^ c);
      BUT_FGEN1RF: return 1'(8'hB4 >> {c, b, a});
      BUT_MGEN:    return (a & b) | (a & c) | (b & c);
      default:     return a ^ b ^ c;   // FGEN2F
    endcase
  endfunction

  task automatic build_tables(but_mode_e m, but_fault_t f);
    for (int i = 0; i < 8; i++) begin
      tf[i] = fa(m, i[0], i[1], i[2]);
      tg[i] = ga(m, i[0], i[1], i[2]);
    end
    if (f.lut_flip_en) begin
      if (f.lut_bit[3]) tg[f.lut_bit[2:0]] = ~tg[f.lut_bit[2:0]];
      else              tf[f.lut_bit[2:0]] = ~tf[f.lut_bit[2:0]];
    end
  endtask

  function automatic logic ref_f();
    logic pp;
    case (mode)
      BUT_FGEN1R:  return rq_r;
      BUT_FGEN1:   return in[3] ? tg[in[2:0]] : tf[in[2:0]];
      BUT_FGEN1RF: return rq_f;
      BUT_MGEN: begin
        pp = in[0] & in[1];
        return in[4] ? tg[{in[3], in[2], pp}] : tf[{in[3], in[2], pp}];
      end
      default:     return tg[{in[4], in[3], tf[in[2:0]]}];
    endcase
  endfunction

  task automatic run_mode(but_mode_e m, but_fault_t f, int cycles);
    logic fx, fy, e;
    mode = m; fault = f;
    build_tables(m, f);
    cfg_init = 1'b1; in = 5'd0;
    #1;
    rq_r = 1'b0; rq_f = 1'b1;
    @(posedge clk); #1 cfg_init = 1'b0;
    for (int i = 0; i < cycles; i++) begin
      in = 5'($urandom);
      #0;
      if (m == BUT_FGEN1R  && in[4])  rq_r = 1'b0;
      if (m == BUT_FGEN1RF && !in[4]) rq_f = 1'b1;
      @(negedge clk);
      if (!(m == BUT_FGEN1RF && !in[4]))
        rq_f = in[3] ? tg[{rq_f, in[1:0]}] : tf[{rq_f, in[1:0]}];
      #1;
      e  = ref_f();
      fx = f.x_sa_en ? f.sa_val : e;
      fy = f.y_sa_en ? f.sa_val : e;
      checks += 2;
      if (x !== fx || y !== fy) begin
        failures++;
        $display("mode %s step %0d in=%b x=%b y=%b expected %b %b",
                 m.name(), i, in, x, y, fx, fy);
      end
      @(posedge clk);
      if (!(m == BUT_FGEN1R && in[4]))
        rq_r = in[3] ? tg[in[2:0]] : tf[in[2:0]];
      #1;
    end
  endtask

  initial begin
    but_fault_t f;
    // fault-free, every mode
    for (int m = 0; m < NUM_BUT_MODES; m++) run_mode(but_mode_e'(m), '0, 200);
    // defects
    for (int k = 0; k < 10; k++) begin
      f = '0;
      case (k % 3)
        0: begin f.x_sa_en = 1'b1; f.sa_val = k[0]; end
        1: begin f.y_sa_en = 1'b1; f.sa_val = ~k[0]; end
        default: begin f.lut_flip_en = 1'b1; f.lut_bit = 4'($urandom); end
      endcase
      run_mode(but_mode_e'(k % NUM_BUT_MODES), f, 100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
