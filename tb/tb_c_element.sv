// tb_c_element: self-checking test of the masked C-element against a
// reference model of the rule: rise when all enabled inputs are 1, fall when
// all are 0, hold otherwise; one step of latency.
module tb_c_element;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in, mask;
  logic out, ref_out;
  int checks = 0, failures = 0;

  c_element #(.N(N)) dut (.clk, .rst_n, .in, .mask, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0; mask = '1; ref_out = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // directed: rise only when all high
    in = 3'b011; @(negedge clk); checks++; if (out !== 0) failures++;
    in = 3'b111; @(negedge clk); checks++; if (out !== 1) failures++;
    in = 3'b100; @(negedge clk); checks++; if (out !== 1) failures++;
    in = 3'b000; @(negedge clk); checks++; if (out !== 0) failures++;
    // masked input ignored
    mask = 3'b011; in = 3'b011; @(negedge clk); checks++; if (out !== 1) failures++;
    in = 3'b100; @(negedge clk); checks++; if (out !== 0) failures++;
    ref_out = 0;
    // random against model
    for (int n = 0; n < 2000; n++) begin
      logic [N-1:0] a1, a0;
      in   = N'($urandom);
      mask = N'($urandom);
      a1 = in | ~mask; a0 = ~in | ~mask;
      if (&a1) ref_out = 1; else if (&a0) ref_out = 0;
      @(negedge clk);
      checks++;
      if (out !== ref_out) begin
        failures++;
        if (failures < 5) $display("mismatch in=%b mask=%b out=%b exp=%b", in, mask, out, ref_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
