// tb_mf_hyperspectral: the matched-filter fabric on hyperspectral pixels.
// The full bank of 140 filters is used with 128 spectral bands per pixel, so
// one 256-word Send buffer holds NP=2 pixels. Default programs for that size
// come from the D and NP parameters. Filters and pixels are random signed
// bytes, and both Send buffers are used in turn.
// Checked for every filter and pixel: the stored 16-bit inner product,
// against a model in the testbench (modulo 2^16).
// Checked for every block: the cycle count NP*(D+3)+2 from start to idle.
// Also checked, from the measured cycles: the sustained rate. Each cell does
// one multiply-accumulate per cycle while the bands stream. A pixel costs
// D+3 cycles, so the array sustains N*D/(D+3) = 136.8 MACs per cycle, which
// must reach the 4.5e9 MAC/s quoted for a 33 MHz clock (136.4 per cycle).
module tb_mf_hyperspectral;
  import fbs_pkg::*;
  localparam int N = 140, D = 128, NP = 2;

  logic clk = 0, rst_n = 0;
  gm_req_t gm_req = '0;
  gm_rsp_t gm_rsp;
  logic signed [7:0] q [N][D];
  logic signed [7:0] pix [NP][D];
  int checks = 0, failures = 0;

  mf_fabric #(.N(N), .D(D), .NP(NP)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint got, longint exp, string what);
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

  // one-cycle reset or start pulse; cycles counts until the fabric is idle
  task automatic pulse(bit is_start, output int cycles);
    @(negedge clk); gm_req = '0;
    if (is_start) gm_req.start = 1; else gm_req.reset = 1;
    @(negedge clk); gm_req = '0;
    cycles = 1;
    while (!gm_rsp.idle) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc, lo, hi, exp;
    longint macs_x1000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (q[i, k]) q[i][k] = 8'($urandom);
    for (int i = 0; i < N; i++)
      for (int k = 0; k < D; k++) gm_write(1 + i, k, 8'(q[i][k]));
    for (int b = 0; b < 2; b++) begin
      foreach (pix[p, k]) pix[p][k] = 8'($urandom);
      for (int p = 0; p < NP; p++)
        for (int k = 0; k < D; k++) gm_write(0, (b << 8) | (p * D + k), 8'(pix[p][k]));
      gm_write(0, 2 << 8, b);
      pulse(0, cyc);
      pulse(1, cyc);
      check(cyc, NP * (D + 3) + 2, "cycles for one block");
      // sustained MACs per cycle (x1000) over the pixel period measured
      macs_x1000 = longint'(N) * D * NP * 1000 / (cyc - 2);
      check(macs_x1000 >= 136364, 1, $sformatf("rate %0d.%03d MACs/cycle >= 136.364",
                                              macs_x1000 / 1000, macs_x1000 % 1000));
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
