// kmeans_fabric: the K-means clustering fabric (unsupervised classification).
//
// For each pixel it finds the class centre at the smallest L1 distance
// sum_k |c_k - p_k| and reports that distance and the class number.
// Cells: Send_0 broadcasts the pixel's components (double-buffered pixel
// memory) to N Dist cells, one per class, each holding a class centre; each
// Dist_i sends its distance to Index_i; the Index chain passes the running
// (minimum distance, class) pair from Index_N-1 down to Index_0 in N cycles;
// Res_0 keeps the final pair in two host-readable registers.
// Sequencers: five, as in the described implementation: Send_0, Res_0 and
// Index_N-1 each have their own; all Dist cells share one; Index_0..N-2 share
// one. Sequencer numbers on the global bus: 0 Send, 1 Dist, 2 Index_0..N-2,
// 3 Index_N-1, 4 Res.
// Global memory (cell number = gm_req.proc): 0 Send_0 (regions 0/1 pixel
// buffers, 2 buffer select), 1..N Dist_0..N-1 (class centre), N+1 Res_0
// (word 0 distance, word 1 class).
// Operation: with the default programs, one start processes the next pixel
// of D components from the active buffer: Dist cells accumulate in cycles
// 1..D, Index runs cycles D+4..D+N+3, Res captures in cycle D+N+4, and the
// fabric is idle again (gm_rsp.idle) D+N+6 cycles after start. A fabric
// reset (gm_req.reset) returns the Send counter to the start of its buffer.
// N=150 classes follows the described implementation; D (default 3, a colour
// pixel) only sets the default programs and can be changed by loading new
// programs.
module kmeans_fabric
  import fbs_pkg::*;
#(
  parameter int N     = 150,
  parameter int D     = 3,
  parameter int DEPTH = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  gm_req_t  gm_req,
  output gm_rsp_t  gm_rsp
);
  localparam int NSEQ = 5;

  logic                 soft_rst;
  logic [CTRL_W-1:0]    ctrl  [NSEQ];
  logic [NSEQ-1:0]      wait_v;
  logic [GM_DW-1:0]     rd    [N+2];
  logic [PROC_W-1:0]    proc_q;

  // pixel broadcast channel
  logic [DATA_W-1:0]    px_data;
  logic                 px_valid;
  // Dist -> Index
  logic [DIST_W-1:0]    d_data  [N];
  logic                 d_valid [N];
  // Index chain: ix_* [i] is the output of Index_i
  logic [DIST_W-1:0]    ix_dist  [N];
  logic [IDX_W-1:0]     ix_idx   [N];
  logic                 ix_valid [N];

  assign soft_rst = gm_req.reset;

  // ---------------------------------------------------------- sequencers
  localparam prog_t PROGS [NSEQ] = '{km_send_prog(D), km_dist_prog(D),
                                     km_index_prog(D, N), km_index_prog(D, N),
                                     km_res_prog(D, N)};
  localparam int ENTRIES [NSEQ] = '{SEND_ENTRY, KM_DIST_ENTRY, KM_INDEX_ENTRY,
                                    KM_INDEX_ENTRY, KM_RES_ENTRY};

  for (genvar s = 0; s < NSEQ; s++) begin : g_seq
    fab_sequencer #(.PROG(PROGS[s]), .ENTRY(ENTRIES[s])) u_seq (
      .clk, .rst_n, .soft_rst, .start(gm_req.start), .cond('0),
      .prog_we(prog_wr_hit(gm_req, s)), .prog_addr(gm_req.addr[SEQ_AW+1:0]),
      .prog_wdata(gm_req.wdata), .ctrl(ctrl[s]), .waiting(wait_v[s]));
  end

  // --------------------------------------------------------------- cells
  send_cell #(.DEPTH(DEPTH)) u_send (
    .clk, .rst_n, .soft_rst, .ctrl(ctrl[0]), .ch_data(px_data), .ch_valid(px_valid),
    .h_we(gm_req.wr_data && gm_req.proc == '0), .h_addr(gm_req.addr),
    .h_wdata(gm_req.wdata), .h_rdata(rd[0]));

  for (genvar i = 0; i < N; i++) begin : g_class
    dist_cell #(.DEPTH(DEPTH)) u_dist (
      .clk, .rst_n, .soft_rst, .ctrl(ctrl[1]), .ch_data(px_data), .ch_valid(px_valid),
      .d_data(d_data[i]), .d_valid(d_valid[i]),
      .h_we(gm_req.wr_data && gm_req.proc == PROC_W'(i + 1)), .h_addr(gm_req.addr),
      .h_wdata(gm_req.wdata), .h_rdata(rd[i+1]));

    if (i == N - 1) begin : g_last
      index_cell #(.MY_IDX(i), .LAST(1'b1)) u_index (
        .clk, .rst_n, .soft_rst, .ctrl(ctrl[3]),
        .d_data(d_data[i]), .d_valid(d_valid[i]),
        .nb_dist('0), .nb_idx('0), .nb_valid(1'b0),
        .out_dist(ix_dist[i]), .out_idx(ix_idx[i]), .out_valid(ix_valid[i]));
    end else begin : g_mid
      index_cell #(.MY_IDX(i), .LAST(1'b0)) u_index (
        .clk, .rst_n, .soft_rst, .ctrl(ctrl[2]),
        .d_data(d_data[i]), .d_valid(d_valid[i]),
        .nb_dist(ix_dist[i+1]), .nb_idx(ix_idx[i+1]), .nb_valid(ix_valid[i+1]),
        .out_dist(ix_dist[i]), .out_idx(ix_idx[i]), .out_valid(ix_valid[i]));
    end
  end

  res_cell u_res (
    .clk, .rst_n, .ctrl(ctrl[4]),
    .in_dist(ix_dist[0]), .in_idx(ix_idx[0]), .in_valid(ix_valid[0]),
    .h_addr(gm_req.addr), .h_rdata(rd[N+1]));

  // ------------------------------------------------------- host read mux
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) proc_q <= '0;
    else        proc_q <= gm_req.proc;

  always_comb begin
    gm_rsp.rdata = '0;
    for (int k = 0; k < N + 2; k++)
      if (proc_q == PROC_W'(k)) gm_rsp.rdata = rd[k];
  end
  assign gm_rsp.idle = &wait_v;

endmodule
