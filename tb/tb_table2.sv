// tb_table2: one logic block of the fabric at its default size, used as a
// buffer between an input pad and an output pad with a producer and consumer
// that answer at once, as in a single-block evaluation. Measures the time per
// data set (one data word plus one spacer) at VDDH, lets the controller pick
// VDDL while the consumer is slow, and measures it again at VDDL once the
// controller is disabled. With the default delays the two times must stand
// in the ratio 4:3 (the published 665 ps against 500 ps is 1.33), and every
// word must arrive unchanged.
module tb_table2;
  import sa_pkg::*;
  localparam int NLB = 16, NPI = 4;
  logic clk = 0, rst_n = 0, enable = 0;
  logic cfg_we = 0;
  logic [$clog2(NLB)-1:0] cfg_addr = 0;
  lb_cfg_t cfg_wdata = '0, cfg_rdata;
  dr_t  pi [NPI];
  logic pi_req [NPI];
  dr_t  po [NLB];
  logic po_req [NLB];
  logic [NLB-1:0] vdd_low;
  int checks = 0, failures = 0;

  sa_fpga dut (.*);

  always #5 clk = ~clk;

  logic sent [$];
  int sink_dly = 0, n_words = 0, t_now = 0, last_t = 0, period = 0;
  always @(posedge clk) t_now++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPI; p++) pi[p] = DR_SPACER;
    @(posedge rst_n);
    forever begin
      logic v;
      @(negedge clk);
      while (!pi_req[0]) @(negedge clk);
      v = 1'($urandom);
      sent.push_back(v);
      pi[0] = dr_encode(v);
      while (pi_req[0]) @(negedge clk);
      pi[0] = DR_SPACER;
    end
  end

  initial begin
    for (int i = 0; i < NLB; i++) po_req[i] = 0;
    @(posedge rst_n);
    po_req[0] = 1;
    forever begin
      @(negedge clk);
      while (!dr_is_data(po[0])) @(negedge clk);
      checks++;
      if (po[0] !== dr_encode(sent.pop_front())) failures++;
      n_words++;
      period = t_now - last_t;
      last_t = t_now;
      repeat (sink_dly) @(negedge clk);
      po_req[0] = 0;
      while (po[0] != DR_SPACER) @(negedge clk);
      repeat (sink_dly) @(negedge clk);
      po_req[0] = 1;
    end
  end

  task automatic wait_words(input int n);
    int w0 = n_words;
    while (n_words < w0 + n) @(negedge clk);
  endtask

  initial begin
    int t_vddh, t_vddl;
    lb_cfg_t c;
    repeat (2) @(posedge clk);
    for (int i = 0; i < NLB; i++) begin
      c = '0;
      if (i == 0) begin
        for (int m = 0; m < 16; m++) c.lut[m] = m[0];
        c.in_sel[0] = 1;
        c.pad_out = 1;
      end
      @(negedge clk);
      cfg_we = 1; cfg_addr = i[$clog2(NLB)-1:0]; cfg_wdata = c;
    end
    @(negedge clk); cfg_we = 0; rst_n = 1;
    wait_words(10);
    t_vddh = period;
    // slow consumer while the controller is enabled -> VDDL
    sink_dly = 10;
    wait_words(3);
    enable = 1;
    wait_words(4);
    enable = 0;
    sink_dly = 0;
    wait_words(10);
    t_vddl = period;
    $display("time per data set: VDDH %0d steps, VDDL %0d steps", t_vddh, t_vddl);
    checks++; if (vdd_low[0] !== 1'b1) failures++;
    checks++; if (t_vddl * 3 != t_vddh * 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
