// delay_element: the controller's delay element of DT steps, stepped model.
//
// A rising input reaches the output DT steps of `clk` later, provided the input
// stays high that long; a falling input clears the output at once. In the
// controller the input comes from a domino buffer, which only rises during an
// evaluation and is reset by precharge, so only the rising edge needs the
// delay. DT stands for the extra delay the logic block's multi-voltage domain
// has at the low supply; the published design sizes the element to that delay.
// The counter realisation is this design's own.
module delay_element #(
  parameter int unsigned DT = 2     // delay in steps, >= 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in,
  output logic out
);
  localparam int unsigned CW = $clog2(DT + 1);
  logic [CW-1:0] cnt;

  assign out = in && (cnt == CW'(DT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cnt <= '0;
    else if (!in)               cnt <= '0;
    else if (cnt != CW'(DT))    cnt <= cnt + 1'b1;
  end

  initial assert (DT >= 1) else $error("delay_element: DT must be at least 1");
endmodule
