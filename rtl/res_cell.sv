// res_cell: result cell (Res_0) of the K-means fabric.
//
// Two registers that the host processor can read: the minimum distance and
// the class index of the current pixel. get (from its own sequencer) loads
// both from Index_0's output channel.
// Host map: word 0 = distance, word 1 = index (region 0); reads return data
// one cycle later. Registers are cleared by power-on reset only.
// The two processor-visible registers follow the Res datapath; the address
// map is this design's.
module res_cell
  import fbs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CTRL_W-1:0]  ctrl,
  input  logic [DIST_W-1:0]  in_dist,
  input  logic [IDX_W-1:0]   in_idx,
  input  logic               in_valid,
  input  logic [GA_W-1:0]    h_addr,
  output logic [GM_DW-1:0]   h_rdata
);
  res_ctrl_t         c;
  logic [DIST_W-1:0] dist_r;
  logic [IDX_W-1:0]  idx_r;

  assign c = res_ctrl_t'(ctrl);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dist_r  <= '0;
      idx_r   <= '0;
      h_rdata <= '0;
    end else begin
      if (c.get) begin
        dist_r <= in_dist;
        idx_r  <= in_idx;
      end
      h_rdata <= h_addr[0] ? GM_DW'(idx_r) : GM_DW'(dist_r);
    end
  end

  a_get_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                c.get |-> in_valid)
    else $error("res_cell: get without a valid result");

endmodule
