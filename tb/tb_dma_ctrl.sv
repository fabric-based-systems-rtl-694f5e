// tb_dma_ctrl: self-checking test of the DMA and fabric controller.
// The controller is connected to the dual-port RAM model and to a fabric
// model in the testbench (a word array per cell with one-cycle read latency,
// plus a log of program writes and reset/start pulses). The test copies a
// block of RAM into a cell, copies a program, reads cell words back into
// RAM, and issues reset and start; every word, address and pulse is
// checked, and a copy of L words must take 2L cycles after the command cycle.
module tb_dma_ctrl;
  import fbs_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reg_we = 0;
  logic [2:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [14:0] dp_addr;
  logic dp_rd, dp_wr;
  logic [15:0] dp_wdata, dp_rdata;
  gm_req_t gm_req;
  gm_rsp_t gm_rsp;
  logic [15:0] cellmem [8][1024];
  logic [15:0] progmem [8][64];
  int n_reset = 0, n_start = 0, n_prog = 0;
  logic fab_idle = 1;
  int checks = 0, failures = 0;

  dma_ctrl dut (.*);
  dpram_model u_ram (.clk, .b_addr(dp_addr), .b_rd(dp_rd), .b_wr(dp_wr),
                     .b_wdata(dp_wdata), .b_rdata(dp_rdata));
  always #5 clk = ~clk;

  // fabric model
  always_ff @(posedge clk) begin
    if (gm_req.wr_data) cellmem[gm_req.proc[2:0]][gm_req.addr] <= gm_req.wdata;
    if (gm_req.wr_prog) begin progmem[gm_req.proc[2:0]][gm_req.addr[5:0]] <= gm_req.wdata; n_prog++; end
    if (gm_req.reset) n_reset++;
    if (gm_req.start) n_start++;
    gm_rsp.rdata <= cellmem[gm_req.proc[2:0]][gm_req.addr];
  end
  assign gm_rsp.idle = fab_idle;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h expected %0h", what, got, exp); end
  endtask

  task automatic wr(int a, int v);
    @(negedge clk); reg_we = 1; reg_addr = 3'(a); reg_wdata = 32'(v);
    @(negedge clk); reg_we = 0;
  endtask

  task automatic run_cmd(int cmd, output int cycles);
    @(negedge clk); reg_we = 1; reg_addr = 3'd0; reg_wdata = 32'(cmd);
    @(negedge clk); reg_we = 0; reg_addr = 3'd5;
    cycles = 1;
    while (reg_rdata[0]) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    foreach (cellmem[i, j]) cellmem[i][j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) u_ram.write16(100 + i, 16'(i * 1000 + 7));
    // RAM -> cell 3, 40 words at 0x105
    wr(1, 100); wr(2, 3); wr(3, 'h105); wr(4, 40);
    reg_addr = 3'd3; #1; check(reg_rdata, 'h105, "GM_ADDR register");
    run_cmd(1, cyc);
    check(cyc, 81, "40-word copy: command cycle + 2 per word");
    for (int i = 0; i < 40; i++) check(cellmem[3]['h105 + i], i * 1000 + 7, $sformatf("cell word %0d", i));
    check(cellmem[3]['h105 + 40], 0, "no word past the end");
    // RAM -> program of sequencer 2, 8 words
    wr(1, 120); wr(2, 2); wr(3, 0); wr(4, 8);
    run_cmd(2, cyc);
    check(n_prog, 8, "eight program writes");
    for (int i = 0; i < 8; i++) check(progmem[2][i], (20 + i) * 1000 + 7, $sformatf("program word %0d", i));
    check(cellmem[2][0], 0, "program copy does not write data");
    // cell 3 -> RAM at 600
    for (int i = 0; i < 16; i++) cellmem[3][i] = 16'(16'hA000 + i);
    wr(1, 600); wr(2, 3); wr(3, 0); wr(4, 16);
    run_cmd(3, cyc);
    check(cyc, 33, "16-word read-back: command cycle + 2 per word");
    for (int i = 0; i < 16; i++) check(u_ram.read16(600 + i), 'hA000 + i, $sformatf("read-back word %0d", i));
    // reset and start pulses
    run_cmd(4, cyc); check(n_reset, 1, "one reset pulse");
    run_cmd(5, cyc); check(n_start, 1, "one start pulse");
    // status shows fabric idle
    fab_idle = 0; reg_addr = 3'd5; #1; check(reg_rdata[1], 0, "status: fabric busy");
    fab_idle = 1; #1; check(reg_rdata[1], 1, "status: fabric idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
