// c_element: N-input Muller C-element with an input mask, stepped model.
//
// The output goes to 1 when every enabled input is 1, to 0 when every enabled
// input is 0, and otherwise keeps its value (the rule of the C-element in the
// handshake circuits of the logic block). Inputs whose `mask` bit is 0 take no
// part; with no input enabled the output goes to 1. The output is a flip-flop,
// so it follows its inputs one step of `clk` later: that step is the gate's
// delay. rst_n (asynchronous, active low) clears the output, the spacer state.
// The two-input form is the one of the published circuit; the mask (used to join
// the requests of several readers of one routing line) is this design's addition.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  input  logic [N-1:0] mask,
  output logic         out
);
  logic all1, all0;
  assign all1 = &(in | ~mask);
  assign all0 = &(~in | ~mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    out <= 1'b0;
    else if (all1) out <= 1'b1;
    else if (all0) out <= 1'b0;
  end
endmodule
