// mf_fabric: the spectral matched-filter fabric.
//
// Filters an image cube with a bank of N matched filters: for every pixel r
// (a vector of D spectral bands) and every filter q_i it computes the inner
// product q_i^T r, the value of the target map of filter i at that pixel.
// Cells: Send_0 broadcasts the bands of each pixel, one per cycle, from its
// double-buffered pixel memory to N MF cells; each MF_i holds its filter's
// coefficients and stores its results back into its own memory.
// Sequencers: 0 drives Send_0, 1 is shared by all MF cells (SIMD).
// Global memory (cell number = gm_req.proc): 0 Send_0 (regions 0/1 pixel
// buffers, 2 buffer select), 1..N MF_0..N-1 (coefficients at 0..D-1, result
// of pixel p as two bytes at D+2p (low) and D+2p+1 (high)).
// Operation: with the default programs one start filters NP pixels stored
// band-interleaved (pixel p, band k at p*D+k); a pixel enters every D+3
// cycles, each MF cell doing one multiply-accumulate per cycle while the
// bands stream.
// N=140 filters follows the described implementation; D=32 bands and NP=8
// pixels per block (filling the 256-word buffer) are this design's defaults
// and only set the default programs.
module mf_fabric
  import fbs_pkg::*;
#(
  parameter int N     = 140,
  parameter int D     = 32,
  parameter int NP    = 8,
  parameter int DEPTH = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  gm_req_t  gm_req,
  output gm_rsp_t  gm_rsp
);
  logic                 soft_rst;
  logic [CTRL_W-1:0]    ctrl [2];
  logic [1:0]           wait_v;
  logic [GM_DW-1:0]     rd   [N+1];
  logic [PROC_W-1:0]    proc_q;
  logic [DATA_W-1:0]    px_data;
  logic                 px_valid;

  assign soft_rst = gm_req.reset;

  fab_sequencer #(.PROG(mf_send_prog(D, NP)), .ENTRY(MF_SEND_ENTRY)) u_seq_send (
    .clk, .rst_n, .soft_rst, .start(gm_req.start), .cond('0),
    .prog_we(prog_wr_hit(gm_req, 0)), .prog_addr(gm_req.addr[SEQ_AW+1:0]),
    .prog_wdata(gm_req.wdata), .ctrl(ctrl[0]), .waiting(wait_v[0]));

  fab_sequencer #(.PROG(mf_prog(D, NP)), .ENTRY(MF_ENTRY)) u_seq_mf (
    .clk, .rst_n, .soft_rst, .start(gm_req.start), .cond('0),
    .prog_we(prog_wr_hit(gm_req, 1)), .prog_addr(gm_req.addr[SEQ_AW+1:0]),
    .prog_wdata(gm_req.wdata), .ctrl(ctrl[1]), .waiting(wait_v[1]));

  send_cell #(.DEPTH(DEPTH)) u_send (
    .clk, .rst_n, .soft_rst, .ctrl(ctrl[0]), .ch_data(px_data), .ch_valid(px_valid),
    .h_we(gm_req.wr_data && gm_req.proc == '0), .h_addr(gm_req.addr),
    .h_wdata(gm_req.wdata), .h_rdata(rd[0]));

  for (genvar i = 0; i < N; i++) begin : g_mf
    mf_cell #(.DEPTH(DEPTH)) u_mf (
      .clk, .rst_n, .soft_rst, .ctrl(ctrl[1]), .ch_data(px_data), .ch_valid(px_valid),
      .h_we(gm_req.wr_data && gm_req.proc == PROC_W'(i + 1)), .h_addr(gm_req.addr),
      .h_wdata(gm_req.wdata), .h_rdata(rd[i+1]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) proc_q <= '0;
    else        proc_q <= gm_req.proc;

  always_comb begin
    gm_rsp.rdata = '0;
    for (int k = 0; k < N + 1; k++)
      if (proc_q == PROC_W'(k)) gm_rsp.rdata = rd[k];
  end
  assign gm_rsp.idle = &wait_v;

endmodule
