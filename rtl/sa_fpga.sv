// sa_fpga: asynchronous island-style FPGA whose logic blocks choose their own
// supply voltage.
//
// ROWS x COLS cells, each a dual-rail logic block with its embedded
// self-adaptive voltage controller, joined by the routing (connection and
// switch blocks) and programmed through the configuration memory. While the
// mapped pipeline runs at its steady rate, a high pulse on `enable` lasting
// several pipeline cycles lets every controller measure its block's slack
// against the request of the next stage and move the block to VDDL where the
// slack covers the extra delay. When enable falls the choices are kept
// (vdd_low) and the controllers idle.
// Interface: cfg_we/cfg_addr/cfg_wdata write one cell's configuration per step,
// with rst_n held low until every cell is written (the memory has no reset);
// pi/pi_req are the dual-rail input pads with their requests, po/po_req the
// output of every logic block (valid as a pad where cfg.pad_out is set).
// Timing: one step of `clk` is the delay of one state-holding gate; the
// multi-voltage domain takes T_MV steps at VDDH and T_MV+DT at VDDL.
// The array size and all step counts are this design's own choices.
module sa_fpga
  import sa_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned NPI  = 4,
  parameter int unsigned T_MV = 4,
  parameter int unsigned DT   = 2,
  localparam int unsigned NLB = ROWS * COLS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,
  input  logic                   cfg_we,
  input  logic [$clog2(NLB)-1:0] cfg_addr,
  input  lb_cfg_t                cfg_wdata,
  output lb_cfg_t                cfg_rdata,
  input  dr_t                    pi      [NPI],
  output logic                   pi_req  [NPI],
  output dr_t                    po      [NLB],
  input  logic                   po_req  [NLB],
  output logic [NLB-1:0]         vdd_low
);
  lb_cfg_t cfg        [NLB];
  dr_t     lb_din     [NLB][LUT_K];
  dr_t     lb_dout    [NLB];
  logic    lb_req_out [NLB];
  logic    lb_req_in  [NLB];

  cfg_sram #(.NLB(NLB)) u_cfg (
    .clk, .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata),
    .rdata(cfg_rdata), .cfg
  );

  routing #(.NLB(NLB), .NPI(NPI)) u_route (
    .clk, .rst_n, .cfg, .lb_dout, .lb_req_out, .lb_din, .lb_req_in,
    .pi, .pi_req, .po, .po_req
  );

  for (genvar i = 0; i < NLB; i++) begin : g_cell
    logic low;
    logic [LUT_K-1:0] used;
    for (genvar k = 0; k < LUT_K; k++) begin : g_used
      assign used[k] = (cfg[i].in_sel[k] != '0);
    end
    logic_block #(.T_MV(T_MV), .DT(DT)) u_lb (
      .clk, .rst_n, .enable,
      .lut_cfg (cfg[i].lut),
      .in_used (used),
      .din     (lb_din[i]),
      .req_out (lb_req_out[i]),
      .dout    (lb_dout[i]),
      .req_in  (lb_req_in[i]),
      .vdd_low (low)
    );
    assign vdd_low[i] = low;
  end
endmodule
