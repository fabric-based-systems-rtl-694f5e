// tb_index_cell: self-checking test of the K-means index cell.
// Two instances: a middle cell (MY_IDX=5) and a last cell (MY_IDX=9, LAST).
// For random own and neighbour distances the middle cell must forward the
// smaller pair, keeping its own class on a tie and when the neighbour is not
// valid; the last cell must always forward its own distance and class.
module tb_index_cell;
  import fbs_pkg::*;

  logic clk = 0, rst_n = 0, soft_rst = 0;
  logic [CTRL_W-1:0] ctrl = '0;
  logic [DIST_W-1:0] d_data = '0, nb_dist = '0;
  logic [IDX_W-1:0] nb_idx = '0;
  logic d_valid = 0, nb_valid = 0;
  logic [DIST_W-1:0] o_dist_m, o_dist_l;
  logic [IDX_W-1:0] o_idx_m, o_idx_l;
  logic o_v_m, o_v_l;
  int checks = 0, failures = 0;

  index_cell #(.MY_IDX(5), .LAST(1'b0)) dut_mid (.clk, .rst_n, .soft_rst, .ctrl,
    .d_data, .d_valid, .nb_dist, .nb_idx, .nb_valid,
    .out_dist(o_dist_m), .out_idx(o_idx_m), .out_valid(o_v_m));
  index_cell #(.MY_IDX(9), .LAST(1'b1)) dut_last (.clk, .rst_n, .soft_rst, .ctrl,
    .d_data, .d_valid, .nb_dist, .nb_idx, .nb_valid,
    .out_dist(o_dist_l), .out_idx(o_idx_l), .out_valid(o_v_l));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    index_ctrl_t c;
    int own, nb, nbv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      own = $urandom_range(0, 1000);
      nb  = (t % 5 == 0) ? own : $urandom_range(0, 1000);
      nbv = (t % 7 == 3) ? 0 : 1;
      c = '0; c.get_dist = 1; ctrl = c; d_data = DIST_W'(own); d_valid = 1;
      @(negedge clk);
      d_valid = 0;
      c = '0; c.cmp = 1; ctrl = c; nb_dist = DIST_W'(nb); nb_idx = IDX_W'(t); nb_valid = nbv[0];
      @(negedge clk);
      ctrl = '0;
      check(o_v_m, 1, "mid valid");
      if (nbv && nb < own) begin
        check(o_dist_m, nb, "mid takes neighbour distance");
        check(o_idx_m, t, "mid takes neighbour index");
      end else begin
        check(o_dist_m, own, "mid keeps own distance");
        check(o_idx_m, 5, "mid keeps own index");
      end
      check(o_dist_l, own, "last forwards own distance");
      check(o_idx_l, 9, "last forwards own index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
