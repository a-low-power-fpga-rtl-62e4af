// tb_domino_buffer: checks precharge (output 0 while pc is 0), evaluation
// (output follows a rising input) and the keeper (output stays 1 after the
// input falls until the next precharge), against a reference model.
module tb_domino_buffer;
  logic clk = 0, rst_n = 0;
  logic pc = 0, in = 0, out, kept;
  int checks = 0, failures = 0;

  domino_buffer dut (.clk, .rst_n, .pc, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; kept = 0;
    @(negedge clk);
    // directed keeper check
    pc = 1; in = 1; #1; checks++; if (out !== 1) failures++;
    @(negedge clk); in = 0; #1; checks++; if (out !== 1) failures++;
    @(negedge clk); pc = 0; #1; checks++; if (out !== 0) failures++;
    @(negedge clk); pc = 1; #1; checks++; if (out !== 0) failures++;
    @(negedge clk); pc = 0; kept = 0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      logic exp;
      pc = 1'($urandom); in = 1'($urandom);
      exp = pc & (in | kept);
      #1;
      checks++;
      if (out !== exp) begin
        failures++;
        if (failures < 5) $display("mismatch pc=%b in=%b out=%b exp=%b", pc, in, out, exp);
      end
      kept = exp;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
