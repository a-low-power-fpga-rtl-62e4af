// logic_block: dual-rail logic block with its own supply selection.
//
// Datapath: four dual-rail inputs drive a 4-input LUT, which turns to data when
// all inputs are data and back to the spacer when all used inputs are spacers
// (in_used marks them). Its output goes through
// the multi-voltage domain (whose delay depends on the selected supply) to an
// OR gate, whose output `ack` says that a data word (1) or the spacer (0) is
// ready, and to an RS latch that keeps the data value. A C-element joins ack
// with req_in from the next stage; its output is inverted and sent back to the
// previous stages as req_out (1 = send data, 0 = send the spacer), and it
// opens the two domino buffers that drive the output rails from the latch:
// while the C-element output is 0 the output is the spacer, while it is 1 the
// output is the latched data word. The LUT, OR gate and RS latch form the
// multi-voltage domain; the C-element, domino buffers and the controller stay at
// VDDH, which is why no level converter is needed.
// Timing: every flip-flop on `clk` is one gate step; the domain adds T_MV steps
// at VDDH and T_MV+DT at VDDL. vdd_low reports the controller's choice.
// Assertions check that the output never shows (1,1) and never changes from
// one data word to another without a spacer in between.
// The structure follows the published logic block; the step model is our own.
module logic_block
  import sa_pkg::*;
#(
  parameter int unsigned T_MV = 4,
  parameter int unsigned DT   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [15:0] lut_cfg,
  input  logic [LUT_K-1:0] in_used,     // LUT inputs that carry traffic
  input  dr_t         din [LUT_K],
  output logic        req_out,
  output dr_t         dout,
  input  logic        req_in,
  output logic        vdd_low
);
  dr_t  lut_o, dom_o;
  logic ack, q, qn, c_out;

  dr_lut4 u_lut (.clk, .rst_n, .in(din), .used(in_used), .cfg(lut_cfg), .out(lut_o));

  mv_domain_delay #(.W(2), .T_MV(T_MV), .DT(DT)) u_mv (
    .clk, .rst_n, .low(vdd_low), .in(lut_o), .out(dom_o)
  );

  assign ack = dom_o.t | dom_o.f;

  rs_latch u_latch (.clk, .rst_n, .s(dom_o.t), .r(dom_o.f), .q, .qn);

  c_element #(.N(2)) u_c (
    .clk, .rst_n, .in({ack, req_in}), .mask(2'b11), .out(c_out)
  );

  assign req_out = ~c_out;

  domino_buffer u_dom_t (.clk, .rst_n, .pc(c_out), .in(q),  .out(dout.t));
  domino_buffer u_dom_f (.clk, .rst_n, .pc(c_out), .in(qn), .out(dout.f));

  sa_controller #(.DT(DT)) u_sac (
    .clk, .rst_n, .enable, .ack, .req(req_in), .vdd_low
  );

  // four-phase dual-rail rules on the block's output
  a_out_code: assert property (@(posedge clk) disable iff (!rst_n) !(dout.t && dout.f))
    else $error("logic_block: output codeword (1,1)");
  a_out_spacer: assert property (@(posedge clk) disable iff (!rst_n)
                                 ($past(rst_n) && dr_is_data($past(dout))) |-> (dout == $past(dout) || dout == DR_SPACER))
    else $error("logic_block: output word changed without a spacer");
endmodule
