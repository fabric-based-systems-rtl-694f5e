// tb_dist_cell: self-checking test of the K-means distance cell.
// A random class centre of D components is loaded through the host port.
// For several random pixels the components are streamed with the cell's
// program timing (get in cycles 1..D, put in cycle D+2); the distance on the
// output channel must equal sum_k |c_k - p_k| computed by the testbench, and
// must be valid exactly one cycle after the put.
module tb_dist_cell;
  import fbs_pkg::*;
  localparam int DEPTH = 256, D = 20, NPIX = 8;

  logic clk = 0, rst_n = 0, soft_rst = 0;
  logic [CTRL_W-1:0] ctrl = '0;
  logic [DATA_W-1:0] ch_data = '0;
  logic ch_valid = 0;
  logic [DIST_W-1:0] d_data;
  logic d_valid;
  logic h_we = 0;
  logic [GA_W-1:0] h_addr = '0;
  logic [GM_DW-1:0] h_wdata = '0, h_rdata;
  logic [7:0] ctr [D];
  int checks = 0, failures = 0;

  dist_cell #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dist_ctrl_t c;
    int exp;
    logic [7:0] p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < D; a++) begin
      ctr[a] = 8'($urandom);
      @(negedge clk); h_we = 1; h_addr = GA_W'(a); h_wdata = GM_DW'(ctr[a]);
    end
    @(negedge clk); h_we = 0;
    for (int px = 0; px < NPIX; px++) begin
      c = '0; c.m.rst_cnt = 1; c.acc_clr = 1; ctrl = c; @(negedge clk);
      exp = 0;
      c = '0; c.get_ch = 1; c.m.en = 1; ctrl = c;
      for (int k = 0; k < D; k++) begin
        p = (px == 0) ? ctr[k] : 8'($urandom);   // pixel 0 sits on the centre
        ch_data = p; ch_valid = 1;
        exp += (ctr[k] > p) ? ctr[k] - p : p - ctr[k];
        @(negedge clk);
      end
      ch_valid = 0; ctrl = '0; @(negedge clk);
      c = '0; c.put_ch = 1; ctrl = c; @(negedge clk);
      ctrl = '0;
      checks++;
      if (!d_valid || d_data != DIST_W'(exp)) begin
        failures++; $display("FAIL pixel %0d: distance %0d valid %0d expected %0d", px, d_data, d_valid, exp);
      end
      @(negedge clk);
      checks++;
      if (d_valid) begin failures++; $display("FAIL valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
