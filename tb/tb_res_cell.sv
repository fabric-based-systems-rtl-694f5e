// tb_res_cell: self-checking test of the K-means result cell.
// Random (distance, class) pairs are captured with get; the host port must
// return them at words 0 and 1 one cycle after the address, and the
// registers must hold while get is low.
module tb_res_cell;
  import fbs_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [CTRL_W-1:0] ctrl = '0;
  logic [DIST_W-1:0] in_dist = '0;
  logic [IDX_W-1:0] in_idx = '0;
  logic in_valid = 0;
  logic [GA_W-1:0] h_addr = '0;
  logic [GM_DW-1:0] h_rdata;
  int checks = 0, failures = 0;

  res_cell dut (.*);
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
    res_ctrl_t c;
    int d, i;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      d = $urandom_range(0, 65535); i = $urandom_range(0, 149);
      c = '0; c.get = 1; ctrl = c; in_dist = DIST_W'(d); in_idx = IDX_W'(i); in_valid = 1;
      @(negedge clk);
      ctrl = '0; in_valid = 0; in_dist = ~in_dist; in_idx = ~in_idx;
      h_addr = 10'd0; @(negedge clk); check(h_rdata, d, "distance register");
      h_addr = 10'd1; @(negedge clk); check(h_rdata, i, "class register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
