// tb_bcast_fabric: end-to-end test of the broadcast example fabric (Send_0
// and N Receive cells) with its default programs.
// The Send buffer gets a random vector of L words and every Rec cell a random
// m0. One start must leave m1 = broadcast + m0 (mod 256) in every cell and
// take L+2 cycles to idle; a second start with a new vector repeats it.
module tb_bcast_fabric;
  import fbs_pkg::*;
  localparam int N = 5, L = 20;

  logic clk = 0, rst_n = 0;
  gm_req_t gm_req = '0;
  gm_rsp_t gm_rsp;
  logic [7:0] v [L];
  logic [7:0] m0 [N][L];
  int checks = 0, failures = 0;

  bcast_fabric #(.N(N), .L(L)) dut (.*);
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
    int cyc, got;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (m0[i, k]) begin m0[i][k] = 8'($urandom); gm_write(1 + i, k, m0[i][k]); end
    pulse(0, cyc);
    for (int run = 0; run < 2; run++) begin
      foreach (v[k]) begin v[k] = 8'($urandom); gm_write(0, k, v[k]); end
      pulse(1, cyc);
      check(cyc, L + 2, "cycles for one broadcast");
      for (int i = 0; i < N; i++)
        for (int k = 0; k < L; k++) begin
          gm_read(1 + i, (1 << 8) | k, got);
          check(got, 8'(v[k] + m0[i][k]), $sformatf("run %0d cell %0d word %0d", run, i, k));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
