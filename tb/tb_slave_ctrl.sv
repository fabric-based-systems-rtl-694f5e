// tb_slave_ctrl: self-checking test of the AHB slave controller.
// A register file in the testbench stands for the DMA controller. AHB-Lite
// write and read transfers (address phase, then data phase) must reach the
// right register; IDLE transfers and transfers with HSEL low must not write;
// back-to-back transfers must work with zero wait states.
module tb_slave_ctrl;
  logic hclk = 0, hresetn = 0;
  logic hsel = 0, hwrite = 0, hready = 1;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = '0;
  logic hreadyout, hresp;
  logic reg_we, reg_re;
  logic [2:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] regs [8];
  int writes = 0;
  int checks = 0, failures = 0;

  slave_ctrl dut (.*);
  always #5 hclk = ~hclk;

  always_ff @(posedge hclk) if (reg_we) begin regs[reg_addr] <= reg_wdata; writes++; end
  assign reg_rdata = regs[reg_addr];

  initial begin : watchdog
    repeat (5000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  // pipelined burst of writes to registers 0..7
  initial begin
    logic [31:0] vals [8];
    foreach (regs[i]) regs[i] = '0;
    repeat (2) @(negedge hclk);
    hresetn = 1;
    foreach (vals[i]) vals[i] = $urandom;
    for (int i = 0; i <= 8; i++) begin
      // address phase of transfer i, data phase of transfer i-1
      if (i < 8) begin hsel = 1; htrans = 2'b10; hwrite = 1; haddr = 32'(i * 4); end
      else begin hsel = 0; htrans = 2'b00; end
      if (i > 0) hwdata = vals[i-1];
      @(negedge hclk);
    end
    foreach (vals[i]) check(regs[i], vals[i], $sformatf("register %0d written", i));
    check(32'(writes), 32'd8, "eight writes");
    // IDLE with HSEL, and NONSEQ without HSEL: no writes
    hsel = 1; htrans = 2'b00; hwrite = 1; haddr = 32'h8; @(negedge hclk); hwdata = 32'hDEAD;
    hsel = 0; htrans = 2'b10; hwrite = 1; haddr = 32'h8; @(negedge hclk); hwdata = 32'hBEEF;
    hsel = 0; htrans = 2'b00; @(negedge hclk);
    check(32'(writes), 32'd8, "no write on IDLE or unselected");
    check(regs[2], vals[2], "register 2 unchanged");
    // reads, back to back
    for (int i = 0; i <= 8; i++) begin
      if (i < 8) begin hsel = 1; htrans = 2'b10; hwrite = 0; haddr = 32'(i * 4); end
      else begin hsel = 0; htrans = 2'b00; end
      @(posedge hclk); #1;
      // now in the data phase of transfer i
      if (i < 8) check(hrdata, vals[i], $sformatf("read register %0d", i));
      check(32'(hreadyout), 32'd1, "zero wait states");
      check(32'(hresp), 32'd0, "OKAY response");
      @(negedge hclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
