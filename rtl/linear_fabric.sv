// linear_fabric: the linear bi-directional example array (P_0, Ele_0..Ele_2).
//
// P_0 streams words from its read memory into the array and stores the
// words that come back into its store memory. The three Ele cells are linked
// both ways; each forwards the stream in either direction or replaces it by
// words from its own memory:
//   P_0 -> Ele_2 -> Ele_1 -> Ele_0 -+   (leftward)
//   P_0 <- Ele_2 <- Ele_1 <- Ele_0 <+   (rightward)
// At the end of the array Ele_0's leftward output is fed back into its
// leftward-side input, turning the stream round. Every hop is one channel
// register, so a word comes back to P_0 seven cycles after it left.
// Sequencers: 0 drives P_0, 1 is shared by the three Ele cells.
// Global memory (cell number = gm_req.proc): 0 P_0 (region 0 read memory,
// region 1 store memory), 1..3 Ele_0..Ele_2 (region 0 memory).
// Operation: with the default programs one start moves L words round the
// array (MEM_SEL=0: P_0 gets its own words back; MEM_SEL=1: P_0 gets Ele_0's
// memory words). L must be at least 7.
// The cells, their sequencer sharing and the two-way links follow the
// example; the turn-round at Ele_0 and the default programs are this
// design's.
module linear_fabric
  import fbs_pkg::*;
#(
  parameter int L       = 256,
  parameter bit MEM_SEL = 1'b0,
  parameter int DEPTH   = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  gm_req_t  gm_req,
  output gm_rsp_t  gm_rsp
);
  localparam int NE = 3;

  logic                 soft_rst;
  logic [CTRL_W-1:0]    ctrl [2];
  logic [1:0]           wait_v;
  logic [GM_DW-1:0]     rd   [NE+1];
  logic [PROC_W-1:0]    proc_q;

  // leftward (lw) and rightward (rw) outputs of each Ele cell
  logic [DATA_W-1:0]    lw_data  [NE], rw_data  [NE];
  logic                 lw_valid [NE], rw_valid [NE];
  logic [DATA_W-1:0]    p_out_data;
  logic                 p_out_valid;

  assign soft_rst = gm_req.reset;

  fab_sequencer #(.PROG(p_prog(L)), .ENTRY(P_ENTRY)) u_seq_p (
    .clk, .rst_n, .soft_rst, .start(gm_req.start), .cond('0),
    .prog_we(prog_wr_hit(gm_req, 0)), .prog_addr(gm_req.addr[SEQ_AW+1:0]),
    .prog_wdata(gm_req.wdata), .ctrl(ctrl[0]), .waiting(wait_v[0]));

  fab_sequencer #(.PROG(ele_prog(L, MEM_SEL)), .ENTRY(ELE_ENTRY)) u_seq_ele (
    .clk, .rst_n, .soft_rst, .start(gm_req.start), .cond('0),
    .prog_we(prog_wr_hit(gm_req, 1)), .prog_addr(gm_req.addr[SEQ_AW+1:0]),
    .prog_wdata(gm_req.wdata), .ctrl(ctrl[1]), .waiting(wait_v[1]));

  p_cell #(.DEPTH(DEPTH)) u_p (
    .clk, .rst_n, .soft_rst, .ctrl(ctrl[0]),
    .in_data(rw_data[NE-1]), .in_valid(rw_valid[NE-1]),
    .out_data(p_out_data), .out_valid(p_out_valid),
    .h_we(gm_req.wr_data && gm_req.proc == '0), .h_addr(gm_req.addr),
    .h_wdata(gm_req.wdata), .h_rdata(rd[0]));

  for (genvar i = 0; i < NE; i++) begin : g_ele
    logic [DATA_W-1:0] in_l_d, in_r_d;
    logic              in_l_v, in_r_v;
    if (i == 0) begin : g_end           // turn-round at the end of the array
      assign in_l_d = lw_data[0];
      assign in_l_v = lw_valid[0];
    end else begin : g_in_l
      assign in_l_d = rw_data[i-1];
      assign in_l_v = rw_valid[i-1];
    end
    if (i == NE - 1) begin : g_p_side
      assign in_r_d = p_out_data;
      assign in_r_v = p_out_valid;
    end else begin : g_in_r
      assign in_r_d = lw_data[i+1];
      assign in_r_v = lw_valid[i+1];
    end

    ele_cell #(.DEPTH(DEPTH)) u_ele (
      .clk, .rst_n, .soft_rst, .ctrl(ctrl[1]),
      .in_l_data(in_l_d), .in_l_valid(in_l_v),
      .in_r_data(in_r_d), .in_r_valid(in_r_v),
      .out_l_data(lw_data[i]), .out_l_valid(lw_valid[i]),
      .out_r_data(rw_data[i]), .out_r_valid(rw_valid[i]),
      .h_we(gm_req.wr_data && gm_req.proc == PROC_W'(i + 1)), .h_addr(gm_req.addr),
      .h_wdata(gm_req.wdata), .h_rdata(rd[i+1]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) proc_q <= '0;
    else        proc_q <= gm_req.proc;

  always_comb begin
    gm_rsp.rdata = '0;
    for (int k = 0; k < NE + 1; k++)
      if (proc_q == PROC_W'(k)) gm_rsp.rdata = rd[k];
  end
  assign gm_rsp.idle = &wait_v;

endmodule
