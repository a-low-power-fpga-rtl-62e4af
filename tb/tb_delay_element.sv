// tb_delay_element: a rising input must reach the output exactly DT steps
// later; a pulse shorter than DT must not pass; a falling input clears the
// output at once.
module tb_delay_element;
  localparam int DT = 3;
  logic clk = 0, rst_n = 0, in = 0, out;
  int checks = 0, failures = 0;

  delay_element #(.DT(DT)) dut (.clk, .rst_n, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 1; w <= 6; w++) begin
      @(negedge clk); in = 1;
      for (int k = 0; k < w; k++) begin
        #1; checks++;
        if (out !== (k >= DT)) begin
          failures++;
          $display("w=%0d k=%0d out=%b", w, k, out);
        end
        @(negedge clk);
      end
      in = 0; #1; checks++; if (out !== 0) failures++;
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
