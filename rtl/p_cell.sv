// p_cell: end cell (P_0) of the linear bi-directional example array.
//
// Two local memories: the read memory mr feeds the output channel (put_ch
// with mr.en registers mr[counter] into the channel and advances the
// counter), and the store memory ms takes the input channel (get_ch with
// ms.en/ms.rw writes the channel word at ms's counter). Both can run in the
// same cycle, so P_0 streams data into the array and collects what comes
// back.
// Host map: region 0 = read memory, region 1 = store memory; reads return
// data one cycle later.
// The two memories and two channels follow the P datapath; the address map
// is this design's.
module p_cell
  import fbs_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               soft_rst,
  input  logic [CTRL_W-1:0]  ctrl,
  input  logic [DATA_W-1:0]  in_data,
  input  logic               in_valid,
  output logic [DATA_W-1:0]  out_data,
  output logic               out_valid,
  input  logic               h_we,
  input  logic [GA_W-1:0]    h_addr,
  input  logic [GM_DW-1:0]   h_wdata,
  output logic [GM_DW-1:0]   h_rdata
);
  localparam int AW = $clog2(DEPTH);

  p_ctrl_t            c;
  logic [DATA_W-1:0]  mr_rd, ms_rd, hr0, hr1;
  logic               region_q;

  assign c = p_ctrl_t'(ctrl);

  fab_dpmem #(.DEPTH(DEPTH)) u_mr (
    .clk, .rst_n, .soft_rst, .mc(c.mr), .wdata('0), .rdata(mr_rd),
    .h_we(h_we && h_addr[9:8] == 2'd0), .h_addr(h_addr[AW-1:0]),
    .h_wdata(h_wdata[DATA_W-1:0]), .h_rdata(hr0));

  fab_dpmem #(.DEPTH(DEPTH)) u_ms (
    .clk, .rst_n, .soft_rst, .mc(c.ms), .wdata(in_data), .rdata(ms_rd),
    .h_we(h_we && h_addr[9:8] == 2'd1), .h_addr(h_addr[AW-1:0]),
    .h_wdata(h_wdata[DATA_W-1:0]), .h_rdata(hr1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= 1'b0;
      region_q  <= 1'b0;
    end else begin
      region_q  <= h_addr[8];
      out_valid <= c.put_ch && !soft_rst;
      if (c.put_ch) out_data <= mr_rd;
    end
  end

  assign h_rdata = GM_DW'(region_q ? hr1 : hr0);

  a_get_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                c.get_ch |-> in_valid)
    else $error("p_cell: get_ch without valid channel data");

endmodule
