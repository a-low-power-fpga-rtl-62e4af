// tb_rs_latch: checks that data 1 sets, data 0 clears and the spacer holds
// the latch, with one step of latency, against a reference model.
module tb_rs_latch;
  logic clk = 0, rst_n = 0;
  logic s = 0, r = 0, q, qn, ref_q;
  int checks = 0, failures = 0;

  rs_latch dut (.clk, .rst_n, .s, .r, .q, .qn);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; ref_q = 0;
    @(negedge clk);
    checks++; if (q !== 0 || qn !== 1) failures++;
    for (int n = 0; n < 1000; n++) begin
      case ($urandom_range(2))
        0: begin s = 1; r = 0; ref_q = 1; end
        1: begin s = 0; r = 1; ref_q = 0; end
        default: begin s = 0; r = 0; end
      endcase
      @(negedge clk);
      checks++;
      if (q !== ref_q || qn !== ~ref_q) begin
        failures++;
        if (failures < 5) $display("mismatch s=%b r=%b q=%b exp=%b", s, r, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
