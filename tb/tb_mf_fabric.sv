// tb_mf_fabric: end-to-end test of the matched-filter fabric with its
// default programs, driven directly on the global-memory bus.
// N random signed filters of D coefficients go into the MF cells, a block of
// NP random pixels into Send buffer 0, and after a fabric reset one start
// filters the whole block. Every MF cell's stored results (two bytes per
// pixel from address D) must equal the signed inner products computed by the
// testbench, modulo 2^16, and the block must take NP*(D+3)+2 cycles (one
// multiply-accumulate per cell per cycle while the bands stream). A second
// block from buffer 1 is then filtered the same way.
module tb_mf_fabric;
  import fbs_pkg::*;
  localparam int N = 6, D = 8, NP = 4;

  logic clk = 0, rst_n = 0;
  gm_req_t gm_req = '0;
  gm_rsp_t gm_rsp;
  logic signed [7:0] q [N][D];
  logic signed [7:0] pix [NP][D];
  int checks = 0, failures = 0;

  mf_fabric #(.N(N), .D(D), .NP(NP)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h expected %0h", what, got, exp); end
  endtask

  task automatic gm_write(int proc, int addr, int data);
    @(negedge clk);
    gm_req = '0; gm_req.wr_data = 1; gm_req.proc = PROC_W'(proc);
    gm_req.addr = GA_W'(addr); gm_req.wdata = GM_DW'(data);
    @(negedge clk); gm_req = '0;
  endtask

  task automatic gm_read(int proc, int addr, output int data);
    @(negedge clk);
    gm_req = '0; gm_req.rd_data = 1; gm_req.proc = PROC_W'(proc); gm_req.addr = GA_W'(addr);
    @(negedge clk); gm_req.rd_data = 0;
    data = int'(gm_rsp.rdata);
  endtask

  task automatic pulse(bit is_start, output int cycles);
    @(negedge clk); gm_req = '0;
    if (is_start) gm_req.start = 1; else gm_req.reset = 1;
    @(negedge clk); gm_req = '0;
    cycles = 1;
    while (!gm_rsp.idle) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc, lo, hi, exp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (q[i, k]) q[i][k] = 8'($urandom);
    for (int i = 0; i < N; i++)
      for (int k = 0; k < D; k++) gm_write(1 + i, k, 8'(q[i][k]));
    for (int b = 0; b < 2; b++) begin
      foreach (pix[p, k]) pix[p][k] = 8'($urandom);
      if (b == 0) for (int k = 0; k < D; k++) pix[0][k] = -8'sd128;   // extreme values
      for (int p = 0; p < NP; p++)
        for (int k = 0; k < D; k++) gm_write(0, (b << 8) | (p * D + k), 8'(pix[p][k]));
      gm_write(0, 2 << 8, b);
      pulse(0, cyc);
      pulse(1, cyc);
      check(cyc, NP * (D + 3) + 2, "cycles for one block");
      for (int i = 0; i < N; i++)
        for (int p = 0; p < NP; p++) begin
          exp = 0;
          for (int k = 0; k < D; k++) exp += int'(q[i][k]) * int'(pix[p][k]);
          gm_read(1 + i, D + 2 * p, lo);
          gm_read(1 + i, D + 2 * p + 1, hi);
          check((hi << 8) | lo, exp & 16'hFFFF, $sformatf("block %0d filter %0d pixel %0d", b, i, p));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
