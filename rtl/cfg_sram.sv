// cfg_sram: configuration memory of the fabric, one word per cell.
//
// Holds for every cell its LUT truth table, the sources of its four LUT inputs,
// the hop count of its output route and its pad enable (sa_pkg::lb_cfg_t).
// Written one cell per step of `clk` through we/addr/wdata; every word is read
// in parallel by the fabric (cfg) and one word is read back through rdata.
// Like SRAM it has no reset: the fabric is held in reset (rst_n low) while
// every word is written, and released afterwards. The published
// fabric keeps its configuration in SRAM cells; the word layout and the write
// port are this design's own.
module cfg_sram
  import sa_pkg::*;
#(
  parameter int unsigned NLB = 16
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic [$clog2(NLB)-1:0]         addr,
  input  lb_cfg_t                        wdata,
  output lb_cfg_t                        rdata,
  output lb_cfg_t                        cfg [NLB]
);
  lb_cfg_t mem [NLB];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign cfg   = mem;
  assign rdata = mem[addr];
endmodule
