// rs_latch: set/reset latch that holds the dual-rail LUT result, stepped model.
//
// s is the LUT's true rail, r its false rail. Data 1 sets q, data 0 clears it,
// the spacer (s=r=0) holds it, so the logic block can keep driving its output
// data after its inputs have returned to the spacer. q and qn are updated one
// step of `clk` after s/r. (1,1) is not a codeword and is flagged by an
// assertion. Reset clears q. The latch and its place follow the published logic
// block; the step timing is this design's own.
module rs_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic s,
  input  logic r,
  output logic q,
  output logic qn
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else if (s) q <= 1'b1;
    else if (r) q <= 1'b0;
  end
  assign qn = ~q;

  a_no_11: assert property (@(posedge clk) disable iff (!rst_n) !(s && r))
    else $error("rs_latch: set and reset both high");
endmodule
