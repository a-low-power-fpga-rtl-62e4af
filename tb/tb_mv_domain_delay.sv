// tb_mv_domain_delay: a change of the input must appear at the output after
// T_MV steps at VDDH and T_MV+DT steps at VDDL, and an output already changed
// must not be undone when the supply switches.
module tb_mv_domain_delay;
  localparam int T_MV = 4, DT = 2;
  logic clk = 0, rst_n = 0, low = 0;
  logic [1:0] in = 0, out;
  int checks = 0, failures = 0;

  mv_domain_delay #(.W(2), .T_MV(T_MV), .DT(DT)) dut (.clk, .rst_n, .low, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_measure(input logic [1:0] v, input int exp_lat);
    int lat = 0;
    @(negedge clk);
    in = v;
    while (out !== v && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("low=%b value=%b latency=%0d expected=%0d", low, v, lat, exp_lat);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      low = n[0];
      step_and_measure(n[1] ? 2'b10 : 2'b01, low ? T_MV + DT : T_MV);
      step_and_measure(2'b00, low ? T_MV + DT : T_MV);
    end
    // settled output survives a switch to VDDL
    low = 0;
    step_and_measure(2'b10, T_MV);
    low = 1;
    repeat (5) begin
      @(negedge clk); checks++; if (out !== 2'b10) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
