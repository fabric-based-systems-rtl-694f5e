// ele_cell: element (Ele_i) of the linear bi-directional example array.
//
// A cell with one local memory and a channel pair in each direction. For
// each direction a multiplexer selects either the memory word at the address
// counter or the word arriving from the opposite side, and put_l / put_r
// register it into the leftward / rightward output channel:
//   out_l <= mem_l ? mem[cnt] : in_r      (leftward, towards Ele_0)
//   out_r <= mem_r ? mem[cnt] : in_l      (rightward, towards P_0)
// m.en advances the counter. A forwarded word keeps the valid bit of its
// source; a memory word is always valid.
// Host map: region 0 = memory; reads return data one cycle later.
// The memory/channel multiplexer follows the Ele datapath; giving each of
// the two directions its own multiplexer is this design's reading of the
// bi-directional array.
module ele_cell
  import fbs_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               soft_rst,
  input  logic [CTRL_W-1:0]  ctrl,
  input  logic [DATA_W-1:0]  in_l_data,    // arriving from the left neighbour
  input  logic               in_l_valid,
  input  logic [DATA_W-1:0]  in_r_data,    // arriving from the right neighbour
  input  logic               in_r_valid,
  output logic [DATA_W-1:0]  out_l_data,   // sent to the left neighbour
  output logic               out_l_valid,
  output logic [DATA_W-1:0]  out_r_data,   // sent to the right neighbour
  output logic               out_r_valid,
  input  logic               h_we,
  input  logic [GA_W-1:0]    h_addr,
  input  logic [GM_DW-1:0]   h_wdata,
  output logic [GM_DW-1:0]   h_rdata
);
  localparam int AW = $clog2(DEPTH);

  ele_ctrl_t          c;
  logic [DATA_W-1:0]  mrd, hr;

  assign c = ele_ctrl_t'(ctrl);

  fab_dpmem #(.DEPTH(DEPTH)) u_mem (
    .clk, .rst_n, .soft_rst, .mc(c.m), .wdata('0), .rdata(mrd),
    .h_we(h_we && h_addr[9:8] == 2'd0), .h_addr(h_addr[AW-1:0]),
    .h_wdata(h_wdata[DATA_W-1:0]), .h_rdata(hr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_l_data  <= '0;
      out_l_valid <= 1'b0;
      out_r_data  <= '0;
      out_r_valid <= 1'b0;
    end else begin
      out_l_valid <= c.put_l && !soft_rst && (c.mem_l || in_r_valid);
      out_r_valid <= c.put_r && !soft_rst && (c.mem_r || in_l_valid);
      if (c.put_l) out_l_data <= c.mem_l ? mrd : in_r_data;
      if (c.put_r) out_r_data <= c.mem_r ? mrd : in_l_data;
    end
  end

  assign h_rdata = GM_DW'(hr);

endmodule
