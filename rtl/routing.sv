// routing: the connection and switch blocks of the fabric, at the level of the
// connections they make.
//
// Every routing line carries three wires: the two rails of a dual-rail bit
// (which also encode its acknowledge) and a request wire running the other way.
// Each LUT input of each logic block selects its source with cfg.in_sel:
// 0 = constant data 0 (an unused input), 1..NPI = input pad p-1, NPI+1.. = the
// output of logic block i. An output reaches its readers after cfg.hops steps
// (one per switch passed), and the request returns after the same delay.
// Where a line has several readers their requests are joined by a C-element,
// so the source moves on only when all of them have asked; a logic block's
// output can also drive its output pad (cfg.pad_out), whose request then joins
// in. A source with no reader sees a constant request of 1.
// The three-wire routing line and the programmable CB/SB routing follow the
// published fabric; since it gives no channel width, track segments or switch
// pattern, this block offers every source to every input, and the request
// join is this design's own.
module routing
  import sa_pkg::*;
#(
  parameter int unsigned NLB = 16,
  parameter int unsigned NPI = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  lb_cfg_t  cfg        [NLB],
  // logic block side
  input  dr_t      lb_dout    [NLB],
  input  logic     lb_req_out [NLB],
  output dr_t      lb_din     [NLB][LUT_K],
  output logic     lb_req_in  [NLB],
  // pads
  input  dr_t      pi         [NPI],
  output logic     pi_req     [NPI],
  output dr_t      po         [NLB],
  input  logic     po_req     [NLB]
);
  localparam int unsigned NS = 1 + NPI + NLB;

  dr_t  src [NS];
  logic lb_join [NLB];
  logic [NLB-1:0] rq_vec;

  always_comb
    for (int j = 0; j < int'(NLB); j++) rq_vec[j] = lb_req_out[j];

  // readers of source s: mask bit j set when any input of block j selects s
  function automatic logic [NLB-1:0] readers(input lb_cfg_t c [NLB], input int s);
    logic [NLB-1:0] m;
    for (int j = 0; j < int'(NLB); j++) begin
      m[j] = 1'b0;
      for (int k = 0; k < int'(LUT_K); k++)
        if (int'(c[j].in_sel[k]) == s) m[j] = 1'b1;
    end
    return m;
  endfunction

  assign src[0] = DR_ZERO;

  for (genvar p = 0; p < NPI; p++) begin : g_pi
    assign src[1+p] = pi[p];
    c_element #(.N(NLB)) u_join (
      .clk, .rst_n, .in(rq_vec), .mask(readers(cfg, 1 + p)), .out(pi_req[p])
    );
  end

  for (genvar i = 0; i < NLB; i++) begin : g_lb
    dr_t dly;
    route_delay #(.W(2), .MAXD(2**HOP_W - 1)) u_fwd (
      .clk, .rst_n, .d(cfg[i].hops), .in(lb_dout[i]), .out(dly)
    );
    assign src[1+NPI+i] = dly;
    assign po[i]        = dly;

    c_element #(.N(NLB+1)) u_join (
      .clk, .rst_n,
      .in  ({po_req[i], rq_vec}),
      .mask({cfg[i].pad_out, readers(cfg, 1 + NPI + i)}),
      .out (lb_join[i])
    );
    route_delay #(.W(1), .MAXD(2**HOP_W - 1)) u_back (
      .clk, .rst_n, .d(cfg[i].hops), .in(lb_join[i]), .out(lb_req_in[i])
    );
  end

  // input crossbar (the connection blocks)
  always_comb
    for (int j = 0; j < int'(NLB); j++)
      for (int k = 0; k < int'(LUT_K); k++) begin
        lb_din[j][k] = DR_ZERO;
        for (int s = 0; s < int'(NS); s++)
          if (int'(cfg[j].in_sel[k]) == s) lb_din[j][k] = src[s];
      end

  initial assert (NS <= 2**SEL_W) else $error("routing: too many sources for SEL_W");
endmodule
