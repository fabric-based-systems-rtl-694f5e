// tb_linear_fabric: end-to-end test of the linear bi-directional array with
// its default programs. Two fabrics are built: one forwarding (MEM_SEL=0),
// where P_0 must get its own L words back in order after their round trip
// P_0 -> Ele_2 -> Ele_1 -> Ele_0 -> Ele_1 -> Ele_2 -> P_0, and one where the
// Ele cells send from memory (MEM_SEL=1), where P_0 must receive Ele_0's
// memory words. Both must be idle L+8 cycles after the start.
module tb_linear_fabric;
  import fbs_pkg::*;
  localparam int L = 20;

  logic clk = 0, rst_n = 0;
  gm_req_t gm_req = '0;
  gm_rsp_t gm_rsp [2];
  logic [7:0] pw [L], ew [3][L];
  int checks = 0, failures = 0, sel = 0;

  linear_fabric #(.L(L), .MEM_SEL(1'b0)) dut_fwd (.clk, .rst_n, .gm_req, .gm_rsp(gm_rsp[0]));
  linear_fabric #(.L(L), .MEM_SEL(1'b1)) dut_mem (.clk, .rst_n, .gm_req, .gm_rsp(gm_rsp[1]));
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
    data = int'(gm_rsp[sel].rdata);
  endtask

  initial begin
    int cyc, got;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (pw[k]) begin pw[k] = 8'($urandom); gm_write(0, k, pw[k]); end
    foreach (ew[e, k]) begin ew[e][k] = 8'($urandom); gm_write(1 + e, k, ew[e][k]); end
    @(negedge clk); gm_req = '0; gm_req.reset = 1;
    @(negedge clk); gm_req = '0; gm_req.start = 1;
    @(negedge clk); gm_req = '0;
    cyc = 1;
    while (!(gm_rsp[0].idle && gm_rsp[1].idle)) begin @(negedge clk); cyc++; end
    check(cyc, L + 8, "cycles for one round trip");
    for (int k = 0; k < L; k++) begin
      sel = 0; gm_read(0, (1 << 8) | k, got);
      check(got, pw[k], $sformatf("forwarded word %0d", k));
      sel = 1; gm_read(0, (1 << 8) | k, got);
      check(got, ew[0][k], $sformatf("Ele_0 memory word %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
