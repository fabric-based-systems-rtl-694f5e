// dist_cell: distance cell (Dist_i) of the K-means fabric.
//
// The local memory holds the class centre, one 8-bit component per word. The
// pixel arrives on the broadcast channel one component per cycle. For each
// component the cell compares centre a and pixel b, selects a-b or b-a with a
// multiplexer (giving |a-b|), registers it, and adds it into an accumulator;
// after the last component the accumulator holds the L1 distance
// sum_k |c_k - p_k|, which put_ch sends to the Index cell of the same class.
// Timing: get_ch with m.en in cycle t gives |a-b| in the pipeline register at
// t+1 and in the accumulator at t+2; put_ch registers the accumulator into the
// output channel (valid the next cycle). acc_clr zeroes the accumulator.
// Host map: region 0 = class-centre memory (reads one cycle late).
// The comparator/subtract/mux/register/accumulator chain follows the Dist
// datapath; the 16-bit distance width is this design's (it holds 256 terms of
// up to 255 each).
module dist_cell
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
  output logic [DIST_W-1:0]  d_data,
  output logic               d_valid,
  input  logic               h_we,
  input  logic [GA_W-1:0]    h_addr,
  input  logic [GM_DW-1:0]   h_wdata,
  output logic [GM_DW-1:0]   h_rdata
);
  localparam int AW = $clog2(DEPTH);

  dist_ctrl_t          c;
  logic [DATA_W-1:0]   ctr, hr, absd;
  logic [DATA_W-1:0]   abs_q;
  logic                abs_v;
  logic [DIST_W-1:0]   acc;

  assign c    = dist_ctrl_t'(ctrl);
  assign absd = (ctr > ch_data) ? (ctr - ch_data) : (ch_data - ctr);

  fab_dpmem #(.DEPTH(DEPTH)) u_mem (
    .clk, .rst_n, .soft_rst, .mc(c.m), .wdata('0), .rdata(ctr),
    .h_we(h_we && h_addr[9:8] == 2'd0), .h_addr(h_addr[AW-1:0]),
    .h_wdata(h_wdata[DATA_W-1:0]), .h_rdata(hr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      abs_q   <= '0;
      abs_v   <= 1'b0;
      acc     <= '0;
      d_data  <= '0;
      d_valid <= 1'b0;
    end else begin
      abs_v <= c.get_ch && !soft_rst;
      if (c.get_ch) abs_q <= absd;
      if (c.acc_clr || soft_rst) acc <= '0;
      else if (abs_v)            acc <= acc + DIST_W'(abs_q);
      d_valid <= c.put_ch && !soft_rst;
      if (c.put_ch) d_data <= acc;
    end
  end

  assign h_rdata = GM_DW'(hr);

  a_get_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                c.get_ch |-> ch_valid)
    else $error("dist_cell: get_ch without valid channel data");

endmodule
