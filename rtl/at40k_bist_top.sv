// at40k_bist_top: the BIST configurations of an AT40K-style FPGA core.
//
// The FPGA tests itself by being loaded, one configuration after another,
// with circuits that generate test patterns, exercise a resource and
// compare the responses. This top holds the three families side by side,
// each with its own ports, as they would be loaded into an ARRAY_SIZE x
// ARRAY_SIZE core (48 for the largest device):
//
//   logic BIST   (lb_*) logic_bist_array: alternating BUT and ORA columns
//                (or rows, when rotated by 90 degrees), five cell modes, two
//                sessions, two BUT-to-ORA routing schemes, results shifted
//                out per ORA column.
//   RAM BIST     (rb_*) ram_bist: the (ARRAY_SIZE/4)^2 free RAMs tested in
//                parallel by one March TPG, results in one ORA shift chain.
//   routing BIST (rt_*) routing_bist: up/even and down/odd parity TPGs over
//                ROUTE_SETS sets of wires under test into parity ORAs. The
//                wires themselves are the fabric's programmable routing and
//                are reached through rt_wut_tx / rt_wut_rx.
//
// The three parts share only the clock. Their controls and timing are
// described in the submodules. The fault inputs (lb_fault, rb_fault) inject
// emulated defects for simulation; tie them to zero for a fault-free device.
//
// The partition and the array and RAM counts follow the document; the
// number of WUT sets, the port naming and the fault inputs are this design's
// choice.
module at40k_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned ARRAY_SIZE = 48,
  parameter int unsigned ROUTE_SETS = 8
) (
  input  logic       clk,

  // logic BIST
  input  logic       lb_cfg_init,
  input  logic       lb_tpg_rst,
  input  logic       lb_ora_rst,
  input  logic       lb_run,
  input  logic       lb_session,
  input  logic       lb_scheme,
  input  logic       lb_rotate,
  input  but_mode_e  lb_mode,
  input  logic       lb_shift,
  input  but_fault_t lb_fault    [ARRAY_SIZE][ARRAY_SIZE],
  output logic       lb_ora_fail [ARRAY_SIZE][ARRAY_SIZE],
  output logic       lb_scan_out [ARRAY_SIZE],

  // RAM BIST
  input  logic       rb_rst,
  input  logic       rb_start,
  input  ram_alg_e   rb_alg,
  input  logic       rb_shift,
  input  ram_fault_t rb_fault    [(ARRAY_SIZE/4)*(ARRAY_SIZE/4)],
  output logic       rb_busy,
  output logic       rb_done,
  output logic       rb_scan_out,
  output logic [RAM_DW-1:0] rb_ora_fail [(ARRAY_SIZE/4)*(ARRAY_SIZE/4)],

  // routing BIST
  input  logic       rt_rst,
  input  logic       rt_run,
  output logic [2:0] rt_wut_tx   [ROUTE_SETS],
  input  logic [2:0] rt_wut_rx   [ROUTE_SETS],
  output logic       rt_fail     [ROUTE_SETS],
  output logic       rt_any_fail
);

  localparam int unsigned RAM_GRID = ARRAY_SIZE / 4;

  logic_bist_array #(.N(ARRAY_SIZE)) u_logic (
    .clk, .cfg_init(lb_cfg_init), .tpg_rst(lb_tpg_rst), .ora_rst(lb_ora_rst),
    .run(lb_run), .session(lb_session), .scheme(lb_scheme), .rotate(lb_rotate),
    .mode(lb_mode),
    .shift(lb_shift), .fault(lb_fault), .ora_fail(lb_ora_fail),
    .scan_out(lb_scan_out)
  );

  ram_bist #(.RAM_ROWS(RAM_GRID), .RAM_COLS(RAM_GRID)) u_ram (
    .clk, .rst(rb_rst), .start(rb_start), .alg(rb_alg), .shift(rb_shift),
    .scan_in(1'b0), .fault(rb_fault), .busy(rb_busy), .done(rb_done),
    .scan_out(rb_scan_out), .ora_fail(rb_ora_fail)
  );

  routing_bist #(.NSETS(ROUTE_SETS)) u_route (
    .clk, .rst(rt_rst), .run(rt_run), .wut_tx(rt_wut_tx), .wut_rx(rt_wut_rx),
    .fail(rt_fail), .any_fail(rt_any_fail)
  );

endmodule
