// fbs_top: Fabric-Based System, processor-side interface and fabrics.
//
// A Fabric-Based System couples a conventional processor to a computational
// fabric through memory: the processor sees the fabric as a large memory.
// It loads cell memories and sequencer programs, starts the fabric and reads
// the results back, all through a DMA controller that moves words between the
// processor's dual-port RAM and the fabric's global memory.
// Each fabric is a separate configuration of the programmable logic, so this
// top places the four described fabrics side by side, each behind its own
// host interface (slave controller + DMA controller), numbered:
//   0  K-means clustering fabric   (Send_0, KM_N Dist/Index pairs, Res_0)
//   1  spectral matched filter     (Send_0, MF_N MF cells)
//   2  broadcast example           (Send_0, BC_N Rec cells)
//   3  linear bi-directional array (P_0, Ele_0..Ele_2)
// Ports of system s: an AHB-Lite slave port (h*[s], driven by the processor
// bridge) and the controller side of the dual-port RAM (dp_*[s], 16-bit
// words, one-cycle read latency). All four share clock and reset.
// The parameters are the fabric sizes; the defaults are the described
// 150-class K-means and 140-filter matched-filter fabrics and the 140-cell,
// 256-word broadcast example.
module fbs_top
  import fbs_pkg::*;
#(
  parameter int KM_N  = 150,
  parameter int KM_D  = 3,
  parameter int MF_N  = 140,
  parameter int MF_D  = 32,
  parameter int MF_NP = 8,
  parameter int BC_N  = 140,
  parameter int BC_L  = 256,
  parameter int LIN_L = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // AHB-Lite slave ports, one per system
  input  logic        hsel      [4],
  input  logic [31:0] haddr     [4],
  input  logic [1:0]  htrans    [4],
  input  logic        hwrite    [4],
  input  logic [31:0] hwdata    [4],
  input  logic        hready    [4],
  output logic        hreadyout [4],
  output logic        hresp     [4],
  output logic [31:0] hrdata    [4],
  // dual-port RAM, DMA side, one per system
  output logic [14:0] dp_addr   [4],
  output logic        dp_rd     [4],
  output logic        dp_wr     [4],
  output logic [15:0] dp_wdata  [4],
  input  logic [15:0] dp_rdata  [4]
);
  gm_req_t gm_req [4];
  gm_rsp_t gm_rsp [4];

  for (genvar s = 0; s < 4; s++) begin : g_host
    logic        reg_we, reg_re;
    logic [2:0]  reg_addr;
    logic [31:0] reg_wdata, reg_rdata;

    slave_ctrl u_slave (
      .hclk(clk), .hresetn(rst_n), .hsel(hsel[s]), .haddr(haddr[s]),
      .htrans(htrans[s]), .hwrite(hwrite[s]), .hwdata(hwdata[s]), .hready(hready[s]),
      .hreadyout(hreadyout[s]), .hresp(hresp[s]), .hrdata(hrdata[s]),
      .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata);

    dma_ctrl u_dma (
      .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
      .dp_addr(dp_addr[s]), .dp_rd(dp_rd[s]), .dp_wr(dp_wr[s]),
      .dp_wdata(dp_wdata[s]), .dp_rdata(dp_rdata[s]),
      .gm_req(gm_req[s]), .gm_rsp(gm_rsp[s]));
  end

  kmeans_fabric #(.N(KM_N), .D(KM_D)) u_kmeans (
    .clk, .rst_n, .gm_req(gm_req[0]), .gm_rsp(gm_rsp[0]));

  mf_fabric #(.N(MF_N), .D(MF_D), .NP(MF_NP)) u_mf (
    .clk, .rst_n, .gm_req(gm_req[1]), .gm_rsp(gm_rsp[1]));

  bcast_fabric #(.N(BC_N), .L(BC_L)) u_bcast (
    .clk, .rst_n, .gm_req(gm_req[2]), .gm_rsp(gm_rsp[2]));

  linear_fabric #(.L(LIN_L)) u_linear (
    .clk, .rst_n, .gm_req(gm_req[3]), .gm_rsp(gm_rsp[3]));

endmodule
