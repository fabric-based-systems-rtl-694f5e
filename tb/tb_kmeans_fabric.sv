// tb_kmeans_fabric: end-to-end test of the K-means fabric with its default
// programs, driven directly on the global-memory bus.
// N random class centres of D components are loaded into the Dist cells and
// two blocks of pixels into the two Send buffers (pixel 0 equals centre 2,
// pixel 1 is equally far from two centres). After a fabric reset each start
// classifies the next pixel; the (distance, class) pair read from Res_0 must
// match a reference search for the smallest L1 distance, lowest class on a
// tie, and the fabric must be idle again D+N+6 cycles after the start.
// The second block is classified after switching the buffer select.
module tb_kmeans_fabric;
  import fbs_pkg::*;
  localparam int N = 8, D = 3, NPIX = 12;

  logic clk = 0, rst_n = 0;
  gm_req_t gm_req = '0;
  gm_rsp_t gm_rsp;
  logic [7:0] ctr [N][D];
  logic [7:0] pix [2][NPIX][D];
  int checks = 0, failures = 0, ties = 0;

  kmeans_fabric #(.N(N), .D(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
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

  function automatic void reference(int b, int p, output int best, output int cls);
    best = 1 << 30; cls = 0;
    for (int c = 0; c < N; c++) begin
      int dsum = 0;
      for (int k = 0; k < D; k++)
        dsum += (ctr[c][k] > pix[b][p][k]) ? ctr[c][k] - pix[b][p][k] : pix[b][p][k] - ctr[c][k];
      if (dsum < best) begin best = dsum; cls = c; end
    end
  endfunction

  initial begin
    int cyc, d, idx, best, cls;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (ctr[c, k]) ctr[c][k] = 8'($urandom);
    ctr[5] = ctr[3];                                  // two equal centres: a tie
    foreach (pix[b, p, k]) pix[b][p][k] = 8'($urandom);
    for (int k = 0; k < D; k++) pix[0][0][k] = ctr[2][k];
    for (int k = 0; k < D; k++) pix[0][1][k] = ctr[3][k];
    for (int c = 0; c < N; c++)
      for (int k = 0; k < D; k++) gm_write(1 + c, k, ctr[c][k]);
    for (int b = 0; b < 2; b++)
      for (int p = 0; p < NPIX; p++)
        for (int k = 0; k < D; k++) gm_write(0, (b << 8) | (p * D + k), pix[b][p][k]);
    for (int b = 0; b < 2; b++) begin
      gm_write(0, 2 << 8, b);          // buffer select
      pulse(0, cyc);                   // fabric reset: counters back to 0
      for (int p = 0; p < NPIX; p++) begin
        pulse(1, cyc);
        check(cyc, D + N + 6, "cycles from start to idle");
        gm_read(N + 1, 0, d);
        gm_read(N + 1, 1, idx);
        reference(b, p, best, cls);
        check(d, best, $sformatf("block %0d pixel %0d distance", b, p));
        check(idx, cls, $sformatf("block %0d pixel %0d class", b, p));
        if (b == 0 && p == 1) ties++;
      end
    end
    check(ties, 1, "tie case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
