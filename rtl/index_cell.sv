// index_cell: index cell (Index_i) of the K-means fabric.
//
// The cells form a chain from Index_N-1 down to Index_0. get_dist loads the
// cell's own distance from its Dist cell. While cmp is set, each cycle the
// cell registers on its output channel either the neighbour's (distance,
// index) pair, when the neighbour's output is valid and strictly smaller, or
// its own distance with its own constant index MY_IDX. The last cell
// (LAST=1) has no neighbour and always forwards its own pair. The chain
// settles one cell per cycle, so after N cycles of cmp Index_0 holds the
// minimum distance over all classes and the class number that gives it;
// ties go to the lower class number.
// Timing: output registered, valid from the cycle after the first cmp.
// The comparator, the two multiplexers and the constant index follow the
// Index datapath; the tie rule is this design's choice.
module index_cell
  import fbs_pkg::*;
#(
  parameter int MY_IDX = 0,
  parameter bit LAST   = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               soft_rst,
  input  logic [CTRL_W-1:0]  ctrl,
  input  logic [DIST_W-1:0]  d_data,     // from Dist_i
  input  logic               d_valid,
  input  logic [DIST_W-1:0]  nb_dist,    // from Index_i+1
  input  logic [IDX_W-1:0]   nb_idx,
  input  logic               nb_valid,
  output logic [DIST_W-1:0]  out_dist,   // to Index_i-1 (or Res_0)
  output logic [IDX_W-1:0]   out_idx,
  output logic               out_valid
);
  index_ctrl_t       c;
  logic [DIST_W-1:0] own;
  logic              take_nb;

  assign c       = index_ctrl_t'(ctrl);
  assign take_nb = !LAST && nb_valid && (own > nb_dist);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own       <= '0;
      out_dist  <= '0;
      out_idx   <= '0;
      out_valid <= 1'b0;
    end else if (soft_rst) begin
      out_valid <= 1'b0;
    end else begin
      if (c.get_dist) own <= d_data;
      if (c.cmp) begin
        out_dist  <= take_nb ? nb_dist : own;
        out_idx   <= take_nb ? nb_idx  : IDX_W'(MY_IDX);
        out_valid <= 1'b1;
      end else if (c.get_dist) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_get_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                c.get_dist |-> d_valid)
    else $error("index_cell: get_dist without a valid distance");

endmodule
