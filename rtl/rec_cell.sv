// rec_cell: Receive cell of the broadcast example fabric.
//
// Datapath: input channel, memory m0, an adder and memory m1. With get_ch,
// m0.en (read) and m1.en+m1.rw (write) set, it computes
// m1[j] <= channel + m0[i] and advances both address counters, so a burst of
// n cycles adds a broadcast vector to the stored one element by element.
// Control: rec_ctrl_t from the (shared) sequencer. The channel carries data
// and a valid bit from a registered sender; get_ch with no valid data is a
// scheduling error and is flagged by an assertion.
// Host map (region = h_addr[9:8]): 0 memory m0, 1 memory m1; reads return
// data one cycle later.
// The datapath is the one of the Receive cell; the 8-bit wrapping add is
// this design's reading of the 8-bit operation module.
module rec_cell
  import fbs_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               soft_rst,
  input  logic [CTRL_W-1:0]  ctrl,
  input  logic [DATA_W-1:0]  ch_data,
  input  logic               ch_valid,
  input  logic               h_we,
  input  logic [GA_W-1:0]    h_addr,
  input  logic [GM_DW-1:0]   h_wdata,
  output logic [GM_DW-1:0]   h_rdata
);
  localparam int AW = $clog2(DEPTH);

  rec_ctrl_t          c;
  logic [DATA_W-1:0]  m0_rd, m1_rd, sum, hr0, hr1;
  logic               region_q;

  assign c   = rec_ctrl_t'(ctrl);
  assign sum = ch_data + m0_rd;

  fab_dpmem #(.DEPTH(DEPTH)) u_m0 (
    .clk, .rst_n, .soft_rst, .mc(c.m0), .wdata('0), .rdata(m0_rd),
    .h_we(h_we && h_addr[9:8] == 2'd0), .h_addr(h_addr[AW-1:0]),
    .h_wdata(h_wdata[DATA_W-1:0]), .h_rdata(hr0));

  fab_dpmem #(.DEPTH(DEPTH)) u_m1 (
    .clk, .rst_n, .soft_rst, .mc(c.m1), .wdata(sum), .rdata(m1_rd),
    .h_we(h_we && h_addr[9:8] == 2'd1), .h_addr(h_addr[AW-1:0]),
    .h_wdata(h_wdata[DATA_W-1:0]), .h_rdata(hr1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) region_q <= 1'b0;
    else        region_q <= h_addr[8];

  assign h_rdata = GM_DW'(region_q ? hr1 : hr0);

  a_get_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                c.get_ch |-> ch_valid)
    else $error("rec_cell: get_ch without valid channel data");

endmodule
