// send_cell: the Send cell that feeds a fabric with pixels.
//
// Datapath: two local memories (buffer 0 and buffer 1), a multiplexer choosing
// one of them, and a registered output channel that is broadcast to the
// receiving cells. While the fabric reads one buffer, the host fills the other
// through the global memory (double buffering), so the transfer of the next
// block of pixels overlaps the computation on the current one.
// Control (send_ctrl_t from the sequencer): memory signals m.* act on the
// active buffer; put_ch loads the addressed word into the channel register,
// whose data and valid bit appear the next cycle.
// Host map (region = h_addr[9:8]): 0 buffer 0, 1 buffer 1, 2 buffer-select
// register (bit 0, readable). Host reads return data one cycle later.
// The cell structure follows the Send datapath (two memories, mux, channel);
// choosing the buffer through a host-visible register is this design's own.
module send_cell
  import fbs_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               soft_rst,
  input  logic [CTRL_W-1:0]  ctrl,
  output logic [DATA_W-1:0]  ch_data,
  output logic               ch_valid,
  input  logic               h_we,
  input  logic [GA_W-1:0]    h_addr,
  input  logic [GM_DW-1:0]   h_wdata,
  output logic [GM_DW-1:0]   h_rdata
);
  localparam int AW = $clog2(DEPTH);

  send_ctrl_t          c;
  memctl_t             mc0, mc1;
  logic [DATA_W-1:0]   rd0, rd1, hr0, hr1, sel_data;
  logic                bufsel;
  logic [1:0]          region_q;

  assign c   = send_ctrl_t'(ctrl);
  assign mc0 = bufsel ? memctl_t'('0) : c.m;
  assign mc1 = bufsel ? c.m : memctl_t'('0);
  assign sel_data = bufsel ? rd1 : rd0;

  fab_dpmem #(.DEPTH(DEPTH)) u_buf0 (
    .clk, .rst_n, .soft_rst, .mc(mc0), .wdata('0), .rdata(rd0),
    .h_we(h_we && h_addr[9:8] == 2'd0), .h_addr(h_addr[AW-1:0]),
    .h_wdata(h_wdata[DATA_W-1:0]), .h_rdata(hr0));

  fab_dpmem #(.DEPTH(DEPTH)) u_buf1 (
    .clk, .rst_n, .soft_rst, .mc(mc1), .wdata('0), .rdata(rd1),
    .h_we(h_we && h_addr[9:8] == 2'd1), .h_addr(h_addr[AW-1:0]),
    .h_wdata(h_wdata[DATA_W-1:0]), .h_rdata(hr1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bufsel   <= 1'b0;
      ch_data  <= '0;
      ch_valid <= 1'b0;
      region_q <= '0;
    end else begin
      region_q <= h_addr[9:8];
      if (h_we && h_addr[9:8] == 2'd2) bufsel <= h_wdata[0];
      ch_valid <= c.put_ch && !soft_rst;
      if (c.put_ch) ch_data <= sel_data;
    end
  end

  always_comb begin
    unique case (region_q)
      2'd0:    h_rdata = GM_DW'(hr0);
      2'd1:    h_rdata = GM_DW'(hr1);
      2'd2:    h_rdata = GM_DW'(bufsel);
      default: h_rdata = '0;
    endcase
  end

endmodule
