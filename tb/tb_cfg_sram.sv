// tb_cfg_sram: writes random words to random cells, and checks the parallel
// view and the read-back port against a reference copy.
module tb_cfg_sram;
  import sa_pkg::*;
  localparam int NLB = 16, AW = $clog2(NLB);
  logic clk = 0, we = 0;
  logic [$clog2(NLB)-1:0] addr = 0;
  lb_cfg_t wdata = '0, rdata;
  lb_cfg_t cfg [NLB];
  lb_cfg_t model [NLB];
  int checks = 0, failures = 0;

  cfg_sram #(.NLB(NLB)) dut (.clk, .we, .addr, .wdata, .rdata, .cfg);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first: the memory has no reset
    for (int i = 0; i < NLB; i++) begin
      @(negedge clk);
      we = 1; addr = i[$clog2(NLB)-1:0]; wdata = lb_cfg_t'({$urandom, $urandom, $urandom});
      model[i] = wdata;
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      addr = AW'($urandom_range(NLB - 1));
      wdata = lb_cfg_t'({$urandom, $urandom, $urandom});
      @(posedge clk);
      if (we) model[addr] = wdata;
      @(negedge clk);
      we = 0;
      addr = AW'($urandom_range(NLB - 1));
      #1;
      checks++;
      if (rdata !== model[addr]) failures++;
      for (int i = 0; i < NLB; i++) begin
        checks++;
        if (cfg[i] !== model[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
