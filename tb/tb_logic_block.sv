// tb_logic_block: one logic block between a 4-phase dual-rail producer (its
// four inputs) and consumer (its output), with adjustable reaction times.
// Checks: every output word equals the truth table applied to its input word;
// the spacer separates words; the input-to-output latency is T_MV+1 steps at
// VDDH and T_MV+DT+1 at VDDL; after an enable pulse a block whose consumer is
// slow moves to VDDL without changing the cycle time, and a block whose
// producer is slow (no slack) stays at VDDH.
module tb_logic_block;
  import sa_pkg::*;
  localparam int T_MV = 4, DT = 2;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [15:0] lut_cfg;
  logic [LUT_K-1:0] in_used = '1;
  dr_t  din [LUT_K];
  dr_t  dout;
  logic req_out, req_in, vdd_low;
  int checks = 0, failures = 0;

  logic_block #(.T_MV(T_MV), .DT(DT)) dut (.*);

  always #5 clk = ~clk;

  int p_dly = 0, c_dly = 0;         // producer / consumer reaction steps
  logic [3:0] sent_q [$];
  int words = 0, last_word_t = 0, period = 0;
  int t_now = 0, t_sent = 0, latency = 0;

  always @(posedge clk) t_now++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer: data after req_out rises, spacer after it falls
  initial begin
    for (int i = 0; i < LUT_K; i++) din[i] = DR_SPACER;
    @(posedge rst_n);
    forever begin
      logic [3:0] v;
      @(negedge clk);
      while (!req_out) @(negedge clk);
      repeat (p_dly) @(negedge clk);
      v = 4'($urandom);
      for (int i = 0; i < LUT_K; i++) din[i] = dr_encode(v[i]);
      sent_q.push_back(v);
      t_sent = t_now;
      while (req_out) @(negedge clk);
      repeat (p_dly) @(negedge clk);
      for (int i = 0; i < LUT_K; i++) din[i] = DR_SPACER;
    end
  end

  // consumer: takes a word, asks for the spacer, then for the next word
  initial begin
    req_in = 1;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      while (!dr_is_data(dout)) begin
        checks++;
        if (dout == '{1'b1, 1'b1}) failures++;
        @(negedge clk);
      end
      begin
        logic [3:0] v;
        v = sent_q.pop_front();
        checks++;
        if (dout !== dr_encode(lut_cfg[v])) begin
          failures++;
          $display("word %0d: in=%h out=%b exp=%b", words, v, dout, dr_encode(lut_cfg[v]));
        end
        latency = t_now - t_sent;
        period = t_now - last_word_t;
        last_word_t = t_now;
        words++;
      end
      repeat (c_dly) @(negedge clk);
      req_in = 0;
      while (dout != DR_SPACER) @(negedge clk);
      repeat (c_dly) @(negedge clk);
      req_in = 1;
    end
  end

  task automatic wait_words(input int n);
    int w0 = words;
    while (words < w0 + n) @(negedge clk);
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int per_a, per_0, per_vl;
    lut_cfg = 16'hE8D4;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 0: the request is already up when a word arrives -> pure latency
    p_dly = 10; c_dly = 0;
    wait_words(6);
    expect_eq(latency, T_MV + 1, "latency at VDDH");
    per_0 = period;
    // A: fast producer, slow consumer -> slack, VDDL
    p_dly = 0; c_dly = 12;
    wait_words(10);
    per_a = period;
    expect_eq(int'(vdd_low), 0, "VDDH before enable");
    enable = 1;
    wait_words(4);
    enable = 0;
    wait_words(2);
    expect_eq(int'(vdd_low), 1, "slack -> VDDL");
    wait_words(10);
    expect_eq(period, per_a, "cycle time unchanged at VDDL");
    // latency at VDDL
    p_dly = 10; c_dly = 0;
    lut_cfg = 16'h1234;
    wait_words(6);
    expect_eq(latency, T_MV + DT + 1, "latency at VDDL");
    per_vl = period;
    // B: no slack with this producer -> back to VDDH, shorter cycle
    enable = 1;
    wait_words(4);
    enable = 0;
    wait_words(2);
    expect_eq(int'(vdd_low), 0, "no slack -> VDDH");
    wait_words(6);
    expect_eq(latency, T_MV + 1, "latency back at VDDH");
    expect_eq(period, per_vl - 2 * DT, "cycle time at VDDH vs VDDL");
    expect_eq(period, per_0, "cycle time at VDDH as at start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
