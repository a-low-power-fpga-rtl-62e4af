// sa_pkg: types and constants shared by the self-adaptive multi-voltage FPGA.
//
// Dual-rail code (one wire pair per bit, rails named t and f):
//   data 0 = (t,f) = (0,1), data 1 = (1,0), spacer = (0,0); (1,1) is never used.
// Every data word is separated from the next one by a spacer (4-phase protocol).
//
// The design is written as a time-stepped model of a self-timed circuit: every
// state-holding gate (C-element, RS latch, domino keeper, controller latch) is a
// flip-flop on a fast stepping clock `clk`, and every delay of the real circuit
// (logic delay, routing delay, the controller's delay element) is a whole number
// of steps. The code table and the structure follow the published design; the
// step model and all widths here are this design's own choices.
package sa_pkg;

  // One dual-rail bit.
  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  localparam dr_t DR_SPACER = '{t: 1'b0, f: 1'b0};
  localparam dr_t DR_ZERO   = '{t: 1'b0, f: 1'b1};
  localparam dr_t DR_ONE    = '{t: 1'b1, f: 1'b0};

  // Number of LUT inputs of a logic block.
  localparam int unsigned LUT_K = 4;

  // Widths of the routing configuration.
  localparam int unsigned SEL_W = 5;   // input source select (0 = constant data 0)
  localparam int unsigned HOP_W = 3;   // switch hops on an LB's output route

  // Encode a binary bit as a dual-rail data codeword.
  function automatic dr_t dr_encode(input logic b);
    return b ? DR_ONE : DR_ZERO;
  endfunction

  function automatic logic dr_is_data(input dr_t d);
    return d.t ^ d.f;
  endfunction

  function automatic logic dr_is_spacer(input dr_t d);
    return ~(d.t | d.f);
  endfunction

  // Configuration of one cell: LUT truth table, source of each LUT input,
  // routing hops of the output, and whether the output drives a pad.
  typedef struct packed {
    logic [15:0]                  lut;
    logic [LUT_K-1:0][SEL_W-1:0]  in_sel;
    logic [HOP_W-1:0]             hops;
    logic                         pad_out;
  } lb_cfg_t;

endpackage
