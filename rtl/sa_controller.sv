// sa_controller: self-adaptive voltage controller of one logic block.
//
// Idea: the request from the next stage (req) is the timing reference. If the
// block's own completion signal (ack) rises at least DT steps before req, the
// block has enough slack to run its logic at VDDL, which adds DT to its delay,
// without stretching the pipeline cycle.
//
// Structure (stepped model of the published circuit): ack passes a domino
// buffer and the delay element of DT steps into a domino AND whose other input
// is the inverted req. When the delayed ack arrives while req is still 0 the
// domino AND fires and stays fired for the rest of the enable pulse; vdd_low
// follows it at once (1 = VDDL). When `enable` falls the latch keeps the last
// choice and the rest of the controller idles; a new enable pulse starts a new
// assignment from VDDH.
// This design's own choices: the ack domino buffer evaluates only in a window
// that opens when ack and req are both 0 (the start of a data phase) and closes
// when req rises, so a stale ack of the previous phase is never counted; only
// the data phase is measured; a tie (delayed ack and req in the same step)
// keeps VDDH. Reset clears the latch to VDDH.
module sa_controller #(
  parameter int unsigned DT = 2     // delay element, steps
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,              // global assignment enable (high pulse)
  input  logic ack,                 // completion of the block's logic
  input  logic req,                 // request from the next stage, 1 = data
  output logic vdd_low              // 1 = select VDDL
);
  logic window, ack_b, ack_d, fired, held;

  // evaluation window of one data phase
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             window <= 1'b0;
    else if (req)           window <= 1'b0;
    else if (!ack)          window <= 1'b1;
  end

  domino_buffer u_ack_buf (
    .clk, .rst_n,
    .pc  (enable & window),
    .in  (ack),
    .out (ack_b)
  );

  delay_element #(.DT(DT)) u_delay (
    .clk, .rst_n,
    .in  (ack_b),
    .out (ack_d)
  );

  // domino AND: precharged while enable is low, fires once per enable pulse
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               fired <= 1'b0;
    else if (!enable)         fired <= 1'b0;
    else if (ack_d && !req)   fired <= 1'b1;
  end

  // latch: transparent during enable, holds the assignment afterwards
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      held <= 1'b0;
    else if (enable) held <= fired;
  end

  assign vdd_low = enable ? fired : held;

  // outside an enable pulse the supply choice never changes
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           ($past(rst_n) && !enable && !$past(enable)) |-> $stable(vdd_low))
    else $error("sa_controller: supply changed while disabled");
endmodule
