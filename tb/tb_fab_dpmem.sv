// tb_fab_dpmem: self-checking test of the dual-port cell memory.
// The host port fills the memory with a known pattern and reads it back
// (one-cycle latency). The cell port then reads sequentially, wraps round
// the end (circular), jumps with load_cnt, restarts with rst_cnt, writes a
// sequence, and writes through the index register; every result is compared
// with a reference array kept by the testbench.
module tb_fab_dpmem;
  import fbs_pkg::*;
  localparam int DEPTH = 256;

  logic clk = 0, rst_n = 0, soft_rst = 0;
  memctl_t mc = '0;
  logic [7:0] wdata = '0, rdata, h_wdata = '0, h_rdata;
  logic h_we = 0;
  logic [7:0] h_addr = '0;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  fab_dpmem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // host fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); h_we = 1; h_addr = 8'(a); h_wdata = 8'(a * 7 + 3); ref_mem[a] = 8'(a * 7 + 3);
    end
    @(negedge clk); h_we = 0;
    // host read back, one cycle latency
    for (int a = 0; a < DEPTH; a += 17) begin
      h_addr = 8'(a);
      @(negedge clk);
      check(h_rdata, ref_mem[a], $sformatf("host read %0d", a));
    end
    // sequential cell read from 0
    mc = '0; mc.rst_cnt = 1; @(negedge clk);
    mc = '0; mc.en = 1;
    for (int k = 0; k < 10; k++) begin
      check(rdata, ref_mem[k], $sformatf("seq read %0d", k));
      @(negedge clk);
    end
    // load counter near the end and wrap round
    mc = '0; mc.load_cnt = 1; mc.operand = 8'd254; @(negedge clk);
    mc = '0; mc.en = 1;
    for (int k = 0; k < 4; k++) begin
      check(rdata, ref_mem[(254 + k) % DEPTH], $sformatf("circular read %0d", k));
      @(negedge clk);
    end
    // without en the counter holds
    mc = '0; @(negedge clk); @(negedge clk);
    check(rdata, ref_mem[2], "hold without en");
    // sequential write of 8 words from 100
    mc = '0; mc.load_cnt = 1; mc.operand = 8'd100; @(negedge clk);
    mc = '0; mc.en = 1; mc.rw = 1;
    for (int k = 0; k < 8; k++) begin
      wdata = 8'(8'hA0 + k); ref_mem[100 + k] = wdata;
      @(negedge clk);
    end
    // indexed write from 200 while the counter stays
    mc = '0; mc.load_idx = 1; mc.operand = 8'd200; @(negedge clk);
    mc = '0; mc.en = 1; mc.rw = 1; mc.idx = 1;
    for (int k = 0; k < 4; k++) begin
      wdata = 8'(8'h50 + k); ref_mem[200 + k] = wdata;
      @(negedge clk);
    end
    mc = '0; #1;
    check(rdata, ref_mem[108], "counter kept during indexed access");
    // collision: host and cell write the same word, the cell wins
    mc = '0; mc.load_cnt = 1; mc.operand = 8'd50; @(negedge clk);
    mc = '0; mc.en = 1; mc.rw = 1; wdata = 8'h11; h_we = 1; h_addr = 8'd50; h_wdata = 8'h22;
    ref_mem[50] = 8'h11;
    @(negedge clk); mc = '0; h_we = 0;
    // host read back of all written words
    for (int a = 0; a < DEPTH; a++) begin
      h_addr = 8'(a);
      @(negedge clk);
      check(h_rdata, ref_mem[a], $sformatf("final host read %0d", a));
    end
    // fabric reset clears the counter
    soft_rst = 1; @(negedge clk); soft_rst = 0;
    check(rdata, ref_mem[0], "counter cleared by fabric reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
