// domino_buffer: precharged (domino) buffer with keeper, stepped model.
//
// While pc is 0 the buffer is precharged and its output is 0. While pc is 1 it
// evaluates: the output rises as soon as `in` is 1 and then stays 1 (the
// dynamic node, once discharged, is not restored) until pc falls again. So the
// output is monotonic within one evaluation, which is what lets a low-voltage
// input drive a high-voltage stage without a level converter. The output is
// combinational in `in` and `pc`; the keeper is a flip-flop on `clk`.
// Behaviour follows the published domino buffer; the step model is our own.
module domino_buffer (
  input  logic clk,
  input  logic rst_n,
  input  logic pc,    // 0 = precharge, 1 = evaluate
  input  logic in,
  output logic out
);
  logic fired;

  assign out = pc & (in | fired);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fired <= 1'b0;
    else        fired <= out;
  end
endmodule
