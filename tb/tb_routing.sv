// tb_routing: random configurations and random traffic on the routing.
// A reference model keeps the history of every logic block output and of every
// request join (computed with the C-element rule) and checks each step that
// every LUT input carries its selected source delayed by that source's hops,
// that every request reaching a block is its readers' join delayed by the same
// hops, and that every pad request is the join of that pad's readers.
module tb_routing;
  import sa_pkg::*;
  localparam int NLB = 4, NPI = 2, NS = 1 + NPI + NLB, H = 8;
  logic clk = 0, rst_n = 0;
  lb_cfg_t cfg [NLB];
  dr_t  lb_dout [NLB], lb_din [NLB][LUT_K], pi [NPI], po [NLB];
  logic lb_req_out [NLB], lb_req_in [NLB], pi_req [NPI], po_req [NLB];
  int checks = 0, failures = 0;

  routing #(.NLB(NLB), .NPI(NPI)) dut (.*);

  always #5 clk = ~clk;

  // reference state
  dr_t  hist_d [NLB][H];   // hist_d[i][n] = lb_dout[i] n steps ago
  logic hist_j [NLB][H];   // join of block i, n steps ago (n=0: current)
  logic join_pi [NPI];

  function automatic logic cjoin(input logic prev, input logic [NLB:0] v, input logic [NLB:0] m);
    if (&(v | ~m)) return 1'b1;
    if (&(~v | ~m)) return 1'b0;
    return prev;
  endfunction

  function automatic logic [NLB-1:0] rd(input int s);
    logic [NLB-1:0] m = '0;
    for (int j = 0; j < NLB; j++)
      for (int k = 0; k < LUT_K; k++)
        if (int'(cfg[j].in_sel[k]) == s) m[j] = 1;
    return m;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NLB; i++) begin
      lb_dout[i] = DR_SPACER; lb_req_out[i] = 0; po_req[i] = 0;
      for (int n = 0; n < H; n++) begin hist_d[i][n] = DR_SPACER; hist_j[i][n] = 0; end
    end
    for (int p = 0; p < NPI; p++) begin pi[p] = DR_SPACER; join_pi[p] = 0; end
    for (int t = 0; t < 20; t++) begin
      // new configuration, then reset to start from a known state
      for (int i = 0; i < NLB; i++) begin
        cfg[i].lut = 16'($urandom);
        for (int k = 0; k < LUT_K; k++) cfg[i].in_sel[k] = SEL_W'($urandom_range(NS - 1));
        cfg[i].hops = HOP_W'($urandom);
        cfg[i].pad_out = 1'($urandom);
      end
      rst_n = 0;
      for (int i = 0; i < NLB; i++) begin
        lb_dout[i] = DR_SPACER;
        for (int n = 0; n < H; n++) begin hist_d[i][n] = DR_SPACER; hist_j[i][n] = 0; end
      end
      for (int p = 0; p < NPI; p++) join_pi[p] = 0;
      @(negedge clk);
      rst_n = 1;
      for (int s = 0; s < 200; s++) begin
        // stimulus
        for (int i = 0; i < NLB; i++) begin
          lb_dout[i] = dr_t'($urandom_range(2));
          lb_req_out[i] = 1'($urandom);
          po_req[i] = 1'($urandom);
        end
        for (int p = 0; p < NPI; p++) pi[p] = dr_t'($urandom_range(2));
        for (int i = 0; i < NLB; i++) hist_d[i][0] = lb_dout[i];
        #1;
        // check combinational view of this step
        for (int j = 0; j < NLB; j++)
          for (int k = 0; k < LUT_K; k++) begin
            int sel;
            dr_t e;
            sel = int'(cfg[j].in_sel[k]);
            if (sel == 0) e = DR_ZERO;
            else if (sel <= NPI) e = pi[sel-1];
            else e = hist_d[sel-1-NPI][cfg[sel-1-NPI].hops];
            checks++;
            if (lb_din[j][k] !== e) begin
              failures++;
              if (failures < 5) $display("t=%0d s=%0d din[%0d][%0d] sel=%0d hops=%0d got %b exp %b", t, s, j, k, sel, 0, lb_din[j][k], e);
            end
          end
        for (int i = 0; i < NLB; i++) begin
          checks += 2;
          if (po[i] !== hist_d[i][cfg[i].hops]) failures++;
          if (lb_req_in[i] !== hist_j[i][cfg[i].hops]) begin
            failures++;
            if (failures < 5) $display("req_in[%0d] got %b exp %b", i, lb_req_in[i], hist_j[i][cfg[i].hops]);
          end
        end
        for (int p = 0; p < NPI; p++) begin
          checks++;
          if (pi_req[p] !== join_pi[p]) failures++;
        end
        @(posedge clk);
        // advance the model by one step
        for (int i = 0; i < NLB; i++) begin
          logic [NLB:0] v, m;
          for (int n = H - 1; n > 0; n--) begin
            hist_d[i][n] = hist_d[i][n-1];
            hist_j[i][n] = hist_j[i][n-1];
          end
          for (int j = 0; j < NLB; j++) v[j] = lb_req_out[j];
          v[NLB] = po_req[i];
          m = {cfg[i].pad_out, rd(1 + NPI + i)};
          hist_j[i][0] = cjoin(hist_j[i][1], v, m);
        end
        for (int p = 0; p < NPI; p++) begin
          logic [NLB:0] v, m;
          for (int j = 0; j < NLB; j++) v[j] = lb_req_out[j];
          v[NLB] = 0;
          m = {1'b0, rd(1 + p)};
          join_pi[p] = cjoin(join_pi[p], v, m);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
