// mv_domain_delay: behavioural timing model of a logic block's multi-voltage
// power domain (LUT, OR gate, RS latch) at the supply its voltage selector picks.
//
// The real domain is analog in this respect: lowering its supply from VDDH to
// VDDL slows it down by an extra delay dt. Here the domain's outputs follow a
// change of its inputs T_MV steps of `clk` later at VDDH (low = 0) and T_MV+DT
// steps later at VDDL (low = 1): the output takes the input's value once the
// input has differed from the output for that many steps. A transition that has
// already reached the output is never undone by a later supply change, as in
// the real circuit. It is written synthesizably so that the whole fabric can be
// simulated or emulated on a stepping clock. The delays are this design's
// choice; the published design gives only the 1.2 V / 1.0 V supplies and the
// resulting processing times of the logic block (500 ps against 665 ps).
module mv_domain_delay #(
  parameter int unsigned W    = 2,  // signal width
  parameter int unsigned T_MV = 4,  // delay at VDDH in steps, >= 1
  parameter int unsigned DT   = 2   // extra delay at VDDL in steps
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         low,         // 1 = domain runs at VDDL
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  localparam int unsigned CW = $clog2(T_MV + DT + 1);
  logic [CW-1:0] cnt, lim;

  assign lim = low ? CW'(T_MV + DT - 1) : CW'(T_MV - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
      cnt <= '0;
    end else if (in == out) begin
      cnt <= '0;
    end else if (cnt >= lim) begin
      out <= in;
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  initial assert (T_MV >= 1) else $error("mv_domain_delay: T_MV must be at least 1");
endmodule
