// tb_sa_controller: drives ack and req of the controller through 4-phase
// cycles with chosen arrival steps. In a data phase where ack rises at step a
// and req at step r, VDDL is correct only when r > a + DT (req still low when
// the delayed ack arrives). Checks the choice during enable, that it is kept
// after enable falls, that a late spacer-phase ack is not counted, and that a
// new enable pulse starts again from VDDH.
module tb_sa_controller;
  localparam int DT = 2;
  logic clk = 0, rst_n = 0, enable = 0, ack = 0, req = 0, vdd_low;
  int checks = 0, failures = 0;

  sa_controller #(.DT(DT)) dut (.clk, .rst_n, .enable, .ack, .req, .vdd_low);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one handshake cycle: data phase (ack at a, req at r), then the spacer
  // phase (req falls at rs, ack falls at as), all counted from the phase start
  task automatic hs_cycle(input int a, input int r, input int rs, input int as_);
    int len = (a > r ? a : r) + 1;
    for (int t = 0; t <= len; t++) begin
      @(negedge clk);
      ack = (t >= a);
      req = (t >= r);
    end
    len = (rs > as_ ? rs : as_) + 1;
    for (int t = 0; t <= len; t++) begin
      @(negedge clk);
      req = !(t >= rs);
      ack = !(t >= as_);
    end
    @(negedge clk);
  endtask

  task automatic check(input logic exp, input string what);
    checks++;
    if (vdd_low !== exp) begin
      failures++;
      $display("%s: vdd_low=%b expected=%b", what, vdd_low, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(0, "after reset");
    // no enable: never switches
    hs_cycle(1, 10, 1, 1);
    check(0, "disabled");
    for (int slack = 0; slack <= 5; slack++) begin
      logic exp;
      exp = (slack > DT);
      enable = 1;
      for (int n = 0; n < 3; n++) begin
        // spacer phase where req falls long before ack: must not count
        hs_cycle(2, 2 + slack, 1, 1 + 8);
        check(exp, $sformatf("enable, slack=%0d", slack));
      end
      @(negedge clk); enable = 0;
      @(negedge clk);
      check(exp, $sformatf("held, slack=%0d", slack));
      // after the pulse, other timing must not change the choice
      hs_cycle(1, 1, 1, 1);
      hs_cycle(1, 12, 1, 1);
      check(exp, $sformatf("held later, slack=%0d", slack));
    end
    // a new pulse restarts at VDDH before it decides
    enable = 1;
    @(negedge clk);
    check(0, "new pulse starts at VDDH");
    hs_cycle(1, 1, 1, 1);
    enable = 0;
    @(negedge clk);
    check(0, "zero slack after VDDL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
