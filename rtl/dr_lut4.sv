// dr_lut4: 4-input 1-output dual-rail look-up table.
//
// Each of the 16 minterms is active when every input carries data and selects
// the rail named by the minterm's bit (input i uses rail t when bit i is 1,
// rail f when it is 0). The true rail of the output is the OR of the active
// minterms whose truth-table bit is 1, the false rail the OR of those whose bit
// is 0, so the output becomes data only when all inputs are data. It returns
// to the spacer only when every used input (`used` bit set) is a spacer again;
// until then it keeps its data word. This input completeness is what lets the
// block's completion signal (the OR of the output rails) stand for all of its
// inputs, so that a block read by paths of different lengths never mixes two
// words. Unused inputs are tied to constant data 0 by the routing.
// `cfg` is the truth table: cfg[m] is the output for input value m (in[0] is
// bit 0). The output is combinational in the inputs; the hold state is a
// flip-flop on `clk` (one step). The LUT is the published block's; the
// minterm structure and the hold are this design's own choices.
module dr_lut4
  import sa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  dr_t              in   [LUT_K],
  input  logic [LUT_K-1:0] used,
  input  logic [15:0]      cfg,
  output dr_t              out
);
  logic [15:0] mt;
  logic        all_spacer;
  dr_t         eval, held;

  always_comb begin
    all_spacer = 1'b1;
    for (int m = 0; m < 16; m++) begin
      mt[m] = 1'b1;
      for (int i = 0; i < int'(LUT_K); i++)
        mt[m] &= m[i] ? in[i].t : in[i].f;
    end
    for (int i = 0; i < int'(LUT_K); i++)
      if (used[i] && !dr_is_spacer(in[i])) all_spacer = 1'b0;
    eval.t = |(mt & cfg);
    eval.f = |(mt & ~cfg);
    if (eval != DR_SPACER) out = eval;
    else if (all_spacer)   out = DR_SPACER;
    else                   out = held;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held <= DR_SPACER;
    else        held <= out;
  end
endmodule
