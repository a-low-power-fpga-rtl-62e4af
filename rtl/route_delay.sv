// route_delay: programmable delay of a routing line, in steps of `clk`.
//
// Models the delay of a route through `d` programmable switches: the output is
// the input delayed by d steps (d = 0 passes it straight through). It is a shift
// register of MAXD stages with the tap chosen by d, so d should only change
// while the fabric is being configured. Reset clears the register (the spacer).
// A routing line's delay is unpredictable in the published fabric; modelling
// it as one step per switch is this design's own choice.
module route_delay #(
  parameter int unsigned W    = 2,
  parameter int unsigned MAXD = 7
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(MAXD+1)-1:0] d,
  input  logic [W-1:0]              in,
  output logic [W-1:0]              out
);
  logic [W-1:0] sr [MAXD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(MAXD); i++) sr[i] <= '0;
    end else begin
      sr[0] <= in;
      for (int i = 1; i < int'(MAXD); i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    out = in;
    for (int i = 1; i <= int'(MAXD); i++)
      if (int'(d) == i) out = sr[i-1];
  end
endmodule
