// tb_fab_sequencer: self-checking test of the microcoded sequencer.
// A small program exercises every flow operation: a 3-times EndLoop around a
// one-cycle instruction and a 5-cycle wait_cycles, a conditional branch taken
// and not taken, jmp and wait_start. The control word seen each cycle is
// compared with a trace written out by hand from the program. Then a program
// word is rewritten through the host port, and a fabric reset in mid-run
// must return to the entry instruction.
module tb_fab_sequencer;
  import fbs_pkg::*;

  logic clk = 0, rst_n = 0, soft_rst = 0, start = 0;
  logic [15:0] cond = '0;
  logic prog_we = 0;
  logic [SEQ_AW+1:0] prog_addr = '0;
  logic [15:0] prog_wdata = '0;
  logic [CTRL_W-1:0] ctrl;
  logic waiting;
  int checks = 0, failures = 0;

  function automatic prog_t test_prog();
    prog_t p = '0;
    p[0] = ui(OP_NEXT,       32'h01);
    p[1] = ui(OP_WAIT,       32'h02, 5);
    p[2] = ui(OP_LOOP,       32'h04, 3, 0);
    p[3] = ui(OP_JCOND,      32'h08, 0, 5, 2);
    p[4] = ui(OP_JMP,        32'h10, 0, 6);
    p[5] = ui(OP_NEXT,       32'h20);
    p[6] = ui(OP_WAIT_START, 32'h40, 0, 0);
    return p;
  endfunction

  fab_sequencer #(.PROG(test_prog()), .ENTRY(6)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctrl(logic [31:0] exp, string what);
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL %s: ctrl=%h expected %h", what, ctrl, exp);
    end
  endtask

  // run from wait_start and compare the trace
  task automatic run_and_check(logic [31:0] exp_tail);
    logic [31:0] exp [$];
    for (int it = 0; it < 3; it++) begin
      exp.push_back(32'h01);
      repeat (5) exp.push_back(32'h02);
      exp.push_back(32'h04);
    end
    exp.push_back(32'h08);
    exp.push_back(exp_tail);
    exp.push_back(32'h40);
    exp.push_back(32'h40);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    foreach (exp[k]) begin
      expect_ctrl(exp[k], $sformatf("trace step %0d", k));
      @(negedge clk);
    end
    checks++;
    if (!waiting) begin failures++; $display("FAIL waiting not set at end"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_ctrl(32'h40, "entry after reset");
    checks++; if (!waiting) begin failures++; $display("FAIL not waiting after reset"); end
    // start must be needed: hold a few cycles without it
    repeat (3) @(negedge clk);
    expect_ctrl(32'h40, "holds without start");

    cond = 16'h0000;  run_and_check(32'h10);   // branch not taken -> jmp
    cond = 16'h0004;  run_and_check(32'h20);   // branch taken

    // rewrite ctrl of instruction 5 (part 3 = bits 63:48, part 2 = 47:32)
    @(negedge clk); prog_we = 1; prog_addr = {4'd5, 2'd2}; prog_wdata = 16'h0080;
    @(negedge clk); prog_we = 0;
    run_and_check(32'h80);

    // soft reset in the middle of the wait
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (3) @(negedge clk);
    expect_ctrl(32'h02, "inside wait");
    soft_rst = 1;
    @(negedge clk) soft_rst = 0;
    expect_ctrl(32'h40, "back to entry after fabric reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
