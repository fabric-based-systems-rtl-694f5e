// bcast_fabric: the broadcast example fabric (one Send cell, N Receive cells).
//
// Send_0 broadcasts a vector from its memory over one channel to every Rec
// cell; each Rec_i adds the received element to the element of its memory m0
// and stores the sum in its memory m1, so all N cells update in parallel.
// Sequencers: 0 drives Send_0 alone, 1 is shared by all Rec cells (all like
// cells with the same controller number get one controller).
// Global memory (cell number = gm_req.proc): 0 Send_0 (regions 0/1 buffers,
// 2 buffer select), 1..N Rec_0..N-1 (region 0 m0, region 1 m1).
// Operation: with the default programs, one start moves L words: Send puts in
// cycles 0..L-1, the Rec cells wait one cycle for the channel register (the
// noop of the Receive program) and add in cycles 1..L.
// N=140 and L=256 follow the described example.
module bcast_fabric
  import fbs_pkg::*;
#(
  parameter int N     = 140,
  parameter int L     = 256,
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
  logic [DATA_W-1:0]    ch_data;
  logic                 ch_valid;

  assign soft_rst = gm_req.reset;

  fab_sequencer #(.PROG(send_burst_prog(L)), .ENTRY(SEND_ENTRY)) u_seq_send (
    .clk, .rst_n, .soft_rst, .start(gm_req.start), .cond('0),
    .prog_we(prog_wr_hit(gm_req, 0)), .prog_addr(gm_req.addr[SEQ_AW+1:0]),
    .prog_wdata(gm_req.wdata), .ctrl(ctrl[0]), .waiting(wait_v[0]));

  fab_sequencer #(.PROG(rec_prog(L)), .ENTRY(REC_ENTRY)) u_seq_rec (
    .clk, .rst_n, .soft_rst, .start(gm_req.start), .cond('0),
    .prog_we(prog_wr_hit(gm_req, 1)), .prog_addr(gm_req.addr[SEQ_AW+1:0]),
    .prog_wdata(gm_req.wdata), .ctrl(ctrl[1]), .waiting(wait_v[1]));

  send_cell #(.DEPTH(DEPTH)) u_send (
    .clk, .rst_n, .soft_rst, .ctrl(ctrl[0]), .ch_data(ch_data), .ch_valid(ch_valid),
    .h_we(gm_req.wr_data && gm_req.proc == '0), .h_addr(gm_req.addr),
    .h_wdata(gm_req.wdata), .h_rdata(rd[0]));

  for (genvar i = 0; i < N; i++) begin : g_rec
    rec_cell #(.DEPTH(DEPTH)) u_rec (
      .clk, .rst_n, .soft_rst, .ctrl(ctrl[1]), .ch_data(ch_data), .ch_valid(ch_valid),
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
