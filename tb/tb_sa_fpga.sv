// tb_sa_fpga: end-to-end test of the fabric at its default size.
//
// Programs an eight-block dual-rail pipeline through the configuration port:
//   x0 = a ^ b, x1 = ~x0, x2 = x1 ^ c, x3 = x2 & x0 (x0 has two readers whose
//   requests are joined), x4 = ~x3, x5 = x4 (long route), x6 = x5,
//   y = x6 ^ d on an output pad,
// feeds four 4-phase producers on the input pads and a consumer on the pad,
// and checks every result word against the same function computed here. It
// then raises `enable` for several pipeline cycles, and checks that blocks
// with slack moved to VDDL, that at least one block stayed at VDDH, that the
// pipeline cycle time did not grow, and that the results stay correct. A
// slow sink then back-pressures the pipeline, and a second enable pulse is
// given while a slow consumer sets the pace: more blocks have slack, at least
// two must move to VDDL, and the cycle must again not grow. The
// configuration is read back. Each mechanism is counted and a mechanism that
// never happened counts as a failure.
module tb_sa_fpga;
  import sa_pkg::*;
  localparam int NLB = 16, NPI = 4, NUSED = 8;
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

  // mechanism counters
  int n_words = 0, n_spacers = 0, n_join = 0, n_src_wait = 0, n_sink_stall = 0;
  int n_to_vddl = 0, n_kept_vddh = 0, n_pulses = 0, n_cfg = 0;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- configuration ----
  function automatic logic [15:0] lut_of(input int kind);
    logic [15:0] l;
    for (int m = 0; m < 16; m++)
      case (kind)
        0: l[m] = m[0] ^ m[1];   // xor
        1: l[m] = ~m[0];         // not
        2: l[m] = m[0] & m[1];   // and
        default: l[m] = m[0];    // buffer
      endcase
    return l;
  endfunction

  function automatic logic [SEL_W-1:0] lbsrc(input int i);
    return SEL_W'(1 + NPI + i);
  endfunction

  lb_cfg_t prog [NLB];

  task automatic make_cfg();
    for (int i = 0; i < NLB; i++) prog[i] = '0;
    prog[0].lut = lut_of(0); prog[0].in_sel[0] = 1;         prog[0].in_sel[1] = 2;
    prog[1].lut = lut_of(1); prog[1].in_sel[0] = lbsrc(0);
    prog[2].lut = lut_of(0); prog[2].in_sel[0] = lbsrc(1);  prog[2].in_sel[1] = 3;
    prog[3].lut = lut_of(2); prog[3].in_sel[0] = lbsrc(2);  prog[3].in_sel[1] = lbsrc(0);
    prog[4].lut = lut_of(1); prog[4].in_sel[0] = lbsrc(3);
    prog[5].lut = lut_of(3); prog[5].in_sel[0] = lbsrc(4);  prog[4].hops = 5;
    prog[6].lut = lut_of(3); prog[6].in_sel[0] = lbsrc(5);
    prog[7].lut = lut_of(0); prog[7].in_sel[0] = lbsrc(6);  prog[7].in_sel[1] = 4;
    prog[7].pad_out = 1;
    for (int i = 0; i < NUSED - 1; i++) if (i != 4) prog[i].hops = 1;
  endtask

  function automatic logic ref_y(input logic [3:0] v);
    logic x0, x1, x2, x3, x4;
    x0 = v[0] ^ v[1]; x1 = ~x0; x2 = x1 ^ v[2]; x3 = x2 & x0; x4 = ~x3;
    return x4 ^ v[3];
  endfunction

  // ---- environment ----
  logic vals [NPI][$];
  int   sink_dly = 0, sink_gap = 0;   // consumer delay before the spacer / before the next word
  int   t_now = 0, last_t = 0, period = 0;

  always @(posedge clk) t_now++;

  for (genvar p = 0; p < NPI; p++) begin : g_src
    initial begin
      pi[p] = DR_SPACER;
      @(posedge rst_n);
      forever begin
        logic v;
        @(negedge clk);
        while (!pi_req[p]) begin n_src_wait++; @(negedge clk); end
        v = 1'($urandom);
        vals[p].push_back(v);
        pi[p] = dr_encode(v);
        while (pi_req[p]) @(negedge clk);
        pi[p] = DR_SPACER;
      end
    end
  end

  initial begin
    for (int i = 0; i < NLB; i++) po_req[i] = 0;
    @(posedge rst_n);
    po_req[7] = 1;
    forever begin
      @(negedge clk);
      while (!dr_is_data(po[7])) @(negedge clk);
      begin
        logic [3:0] v;
        logic y;
        for (int p = 0; p < NPI; p++) v[p] = vals[p].pop_front();
        y = ref_y(v);
        checks++;
        if (po[7] !== dr_encode(y)) begin
          failures++;
          $display("word %0d: inputs=%b out=%b expected %b", n_words, v, po[7], dr_encode(y));
        end
        n_words++;
        period = t_now - last_t;
        last_t = t_now;
      end
      repeat (sink_dly) begin n_sink_stall++; @(negedge clk); end
      po_req[7] = 0;
      while (po[7] != DR_SPACER) @(negedge clk);
      n_spacers++;
      repeat (sink_gap) begin n_sink_stall++; @(negedge clk); end
      po_req[7] = 1;
    end
  end

  // reader join: block 0's output waits for both readers
  always @(posedge clk)
    if (rst_n && dut.lb_req_out[1] != dut.lb_req_out[3]) n_join++;

  task automatic wait_words(input int n);
    int w0 = n_words;
    while (n_words < w0 + n) @(negedge clk);
  endtask

  initial begin
    int per_before, per_after, min_before, max_after;
    make_cfg();
    // the fabric is held in reset while it is programmed
    repeat (2) @(posedge clk);
    for (int i = 0; i < NLB; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = i[$clog2(NLB)-1:0]; cfg_wdata = prog[i];
      n_cfg++;
    end
    @(negedge clk); cfg_we = 0;
    for (int i = 0; i < NLB; i++) begin
      cfg_addr = i[$clog2(NLB)-1:0];
      #1; checks++;
      if (cfg_rdata !== prog[i]) failures++;
    end
    // release the fabric under the new configuration
    @(negedge clk); rst_n = 1;

    wait_words(20);
    min_before = 1 << 30;
    for (int n = 0; n < 10; n++) begin
      wait_words(1);
      if (period < min_before) min_before = period;
    end
    per_before = period;
    checks++; if (vdd_low != '0) failures++;

    enable = 1; n_pulses++;
    wait_words(6);
    enable = 0;
    wait_words(20);
    max_after = 0;
    for (int n = 0; n < 10; n++) begin
      wait_words(1);
      if (period > max_after) max_after = period;
    end
    per_after = period;
    for (int i = 0; i < NUSED; i++) if (vdd_low[i]) n_to_vddl++; else n_kept_vddh++;
    $display("cycle before %0d (min %0d), after %0d (max %0d); VDDL blocks %b",
             per_before, min_before, per_after, max_after, vdd_low[NUSED-1:0]);
    checks++;
    if (max_after > per_before) begin
      failures++;
      $display("pipeline cycle grew from %0d to %0d", per_before, max_after);
    end

    // a sink slower than the pipeline: back-pressure through all stages
    sink_dly = 15;
    wait_words(5);
    sink_dly = 0;
    wait_words(5);

    // second assignment while a slow consumer sets the pace: the blocks
    // now have slack in the data phase as well and more of them move to
    // VDDL; under the same consumer the cycle must not grow
    sink_dly = 30; sink_gap = 30;
    wait_words(15);
    per_before = period;
    enable = 1; n_pulses++;
    #1;
    checks++; if (vdd_low != '0) failures++;   // a new pulse restarts from VDDH
    wait_words(6);
    enable = 0;
    wait_words(15);
    max_after = 0;
    for (int n = 0; n < 10; n++) begin
      wait_words(1);
      if (period > max_after) max_after = period;
    end
    begin
      int nl;
      nl = 0;
      for (int i = 0; i < NUSED; i++) if (vdd_low[i]) nl++;
      $display("slow consumer: cycle before %0d, after (max) %0d; VDDL blocks %b",
               per_before, max_after, vdd_low[NUSED-1:0]);
      n_to_vddl += nl; n_kept_vddh += NUSED - nl;
      checks++;
      if (nl < 2) begin failures++; $display("slow consumer: only %0d blocks at VDDL", nl); end
    end
    checks++;
    if (max_after > per_before) begin
      failures++;
      $display("pipeline cycle grew from %0d to %0d", per_before, max_after);
    end
    // unused blocks never leave VDDH
    checks++; if (vdd_low[NLB-1:NUSED] != '0) failures++;

    $display("words=%0d spacers=%0d join_waits=%0d src_waits=%0d sink_stalls=%0d vddl=%0d vddh=%0d pulses=%0d cfg=%0d",
             n_words, n_spacers, n_join, n_src_wait, n_sink_stall, n_to_vddl, n_kept_vddh, n_pulses, n_cfg);
    begin
      int cnt [9];
      cnt = '{n_words, n_spacers, n_join, n_src_wait, n_sink_stall, n_to_vddl, n_kept_vddh, n_pulses, n_cfg};
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (cnt[k] == 0) begin failures++; $display("mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
