// mf_cell: matched-filter cell (MF_i).
//
// The local memory holds the filter q_i, one signed 8-bit coefficient per
// spectral band, at addresses 0..d-1. The pixel's bands arrive on the
// broadcast channel one per cycle. With get_ch and m.en the cell multiplies
// band and coefficient (signed 8x8), registers the product and adds it into
// a 16-bit accumulator on the next cycle, giving the inner product q_i^T r.
// Two byte selectors and a multiplexer (wsel_hi) then write the accumulator
// back into the same memory, low byte first, through the memory's index
// register, so the results of successive pixels fill the memory from
// address d upwards. acc_clr zeroes the accumulator.
// Host map: region 0 = memory (coefficients in, results out), reads one cycle
// late.
// Multiplier, register, accumulator, selectors and multiplexer back into
// memory follow the MF datapath; the 16-bit wrapping accumulator reads the
// "8/16 bit" multiply-accumulate; the memory layout is this design's.
module mf_cell
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

  mf_ctrl_t                  c;
  logic signed [DATA_W-1:0]  coef;
  logic [DATA_W-1:0]         hr, wbyte;
  logic signed [ACC_W-1:0]   prod, acc;
  logic                      prod_v;
  logic signed [ACC_W-1:0]   coef_x, band_x;

  assign c     = mf_ctrl_t'(ctrl);
  assign wbyte  = c.wsel_hi ? acc[15:8] : acc[7:0];
  assign coef_x = ACC_W'(coef);                       // sign-extended
  assign band_x = ACC_W'($signed(ch_data));

  fab_dpmem #(.DEPTH(DEPTH)) u_mem (
    .clk, .rst_n, .soft_rst, .mc(c.m), .wdata(wbyte), .rdata(coef),
    .h_we(h_we && h_addr[9:8] == 2'd0), .h_addr(h_addr[AW-1:0]),
    .h_wdata(h_wdata[DATA_W-1:0]), .h_rdata(hr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod   <= '0;
      prod_v <= 1'b0;
      acc    <= '0;
    end else begin
      prod_v <= c.get_ch && !soft_rst;
      if (c.get_ch) prod <= coef_x * band_x;
      if (c.acc_clr || soft_rst) acc <= '0;
      else if (prod_v)           acc <= acc + prod;
    end
  end

  assign h_rdata = GM_DW'(hr);

  a_get_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                c.get_ch |-> ch_valid)
    else $error("mf_cell: get_ch without valid channel data");

endmodule
