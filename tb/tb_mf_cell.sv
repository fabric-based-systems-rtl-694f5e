// tb_mf_cell: self-checking test of the matched-filter cell.
// D random signed coefficients are loaded through the host port. Several
// random pixels are streamed with the MF program timing (multiply in cycles
// 1..D, counter reset, low byte write, high byte write with accumulator
// clear). The results read back from addresses D+2p and D+2p+1 must equal
// the signed inner product computed by the testbench, modulo 2^16.
module tb_mf_cell;
  import fbs_pkg::*;
  localparam int DEPTH = 256, D = 24, NP = 6;

  logic clk = 0, rst_n = 0, soft_rst = 0;
  logic [CTRL_W-1:0] ctrl = '0;
  logic [DATA_W-1:0] ch_data = '0;
  logic ch_valid = 0;
  logic h_we = 0;
  logic [GA_W-1:0] h_addr = '0;
  logic [GM_DW-1:0] h_wdata = '0, h_rdata;
  logic signed [7:0] q [D];
  int exp [NP];
  int checks = 0, failures = 0;

  mf_cell #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mf_ctrl_t c;
    logic signed [7:0] b;
    logic [15:0] got;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < D; a++) begin
      q[a] = 8'($urandom);
      @(negedge clk); h_we = 1; h_addr = GA_W'(a); h_wdata = GM_DW'(q[a]);
    end
    @(negedge clk); h_we = 0;
    c = '0; c.m.rst_cnt = 1; c.acc_clr = 1; ctrl = c; @(negedge clk);
    c = '0; c.m.load_idx = 1; c.m.operand = 8'(D); ctrl = c; @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      exp[p] = 0;
      c = '0; c.get_ch = 1; c.m.en = 1; ctrl = c;
      for (int k = 0; k < D; k++) begin
        b = (p == 0) ? 8'sd127 : 8'($urandom);
        ch_data = b; ch_valid = 1;
        exp[p] += int'(q[k]) * int'(b);
        @(negedge clk);
      end
      ch_valid = 0;
      c = '0; c.m.rst_cnt = 1; ctrl = c; @(negedge clk);
      c = '0; c.m.en = 1; c.m.rw = 1; c.m.idx = 1; ctrl = c; @(negedge clk);
      c = '0; c.m.en = 1; c.m.rw = 1; c.m.idx = 1; c.wsel_hi = 1; c.acc_clr = 1; ctrl = c; @(negedge clk);
    end
    ctrl = '0;
    for (int p = 0; p < NP; p++) begin
      h_addr = GA_W'(D + 2 * p);     @(negedge clk); got[7:0]  = h_rdata[7:0];
      h_addr = GA_W'(D + 2 * p + 1); @(negedge clk); got[15:8] = h_rdata[7:0];
      checks++;
      if (got !== 16'(exp[p])) begin
        failures++; $display("FAIL pixel %0d: %h expected %h", p, got, 16'(exp[p]));
      end
    end
    // coefficients untouched
    for (int a = 0; a < D; a++) begin
      h_addr = GA_W'(a); @(negedge clk);
      checks++;
      if (h_rdata[7:0] !== q[a]) begin failures++; $display("FAIL coefficient %0d overwritten", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
