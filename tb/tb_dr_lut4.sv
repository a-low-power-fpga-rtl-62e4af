// tb_dr_lut4: checks the dual-rail LUT for random truth tables and input
// masks. Inputs arrive one by one in random order: the output must stay the
// spacer until the last input is data, then carry the table's bit for the
// input word. Inputs then leave one by one: the output must keep the word
// until the last used input is a spacer, and then be the spacer. Unused
// inputs are tied to data 0, as the routing does.
module tb_dr_lut4;
  import sa_pkg::*;
  logic clk = 0, rst_n = 0;
  dr_t in [LUT_K];
  logic [LUT_K-1:0] used;
  logic [15:0] cfg;
  dr_t out;
  int checks = 0, failures = 0;

  dr_lut4 dut (.clk, .rst_n, .in, .used, .cfg, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input dr_t e, input string what);
    #1;
    checks++;
    if (out !== e) begin
      failures++;
      if (failures < 10) $display("%s: cfg=%h used=%b out=%b exp=%b", what, cfg, used, out, e);
    end
  endtask

  initial begin
    for (int i = 0; i < LUT_K; i++) in[i] = DR_SPACER;
    used = '1; cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic [3:0] v;
      int order [LUT_K];
      int n_used;
      @(negedge clk);
      cfg  = (t == 0) ? 16'h6996 : 16'($urandom);
      used = (t < 16) ? 4'hF : 4'($urandom);
      if (used == 0) used = 4'b0001;
      v = 4'($urandom);
      for (int i = 0; i < LUT_K; i++) begin
        order[i] = i;
        if (!used[i]) begin in[i] = DR_ZERO; v[i] = 1'b0; end
        else in[i] = DR_SPACER;
      end
      order.shuffle();
      n_used = $countones(used);
      // arrivals
      begin
        int seen;
        seen = 0;
        for (int n = 0; n < LUT_K; n++) begin
          int i;
          i = order[n];
          if (!used[i]) continue;
          in[i] = dr_encode(v[i]);
          seen++;
          expect_out(seen == n_used ? dr_encode(cfg[v]) : DR_SPACER, "arrival");
          @(negedge clk);
        end
      end
      // departures
      order.shuffle();
      begin
        int gone;
        gone = 0;
        for (int n = 0; n < LUT_K; n++) begin
          int i;
          i = order[n];
          if (!used[i]) continue;
          in[i] = DR_SPACER;
          gone++;
          expect_out(gone == n_used ? DR_SPACER : dr_encode(cfg[v]), "departure");
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
