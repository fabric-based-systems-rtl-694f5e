// tb_send_cell: self-checking test of the Send cell.
// Both buffers are filled by the host with different patterns. With buffer 0
// selected a put burst must put buffer 0's words on the channel in order,
// each valid one cycle after its put; after the host selects buffer 1 (and
// the counter is reset) the burst must come from buffer 1. The buffer-select
// register and a buffer word are read back through the host port.
module tb_send_cell;
  import fbs_pkg::*;
  localparam int DEPTH = 256;

  logic clk = 0, rst_n = 0, soft_rst = 0;
  logic [CTRL_W-1:0] ctrl = '0;
  logic [DATA_W-1:0] ch_data;
  logic ch_valid;
  logic h_we = 0;
  logic [GA_W-1:0] h_addr = '0;
  logic [GM_DW-1:0] h_wdata = '0, h_rdata;
  int checks = 0, failures = 0;

  send_cell #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h expected %0h", what, got, exp); end
  endtask

  function automatic logic [7:0] pat(int b, int a);
    return b ? 8'(255 - a) : 8'(a * 3 + 1);
  endfunction

  task automatic burst(int b, int n);
    send_ctrl_t c;
    c = '0; c.m.rst_cnt = 1; ctrl = c; @(negedge clk);
    c = '0; c.put_ch = 1; c.m.en = 1; ctrl = c;
    @(negedge clk);
    for (int k = 0; k < n; k++) begin
      check(ch_valid, 1, "valid during burst");
      check(ch_data, pat(b, k), $sformatf("buffer %0d word %0d", b, k));
      if (k == n - 1) ctrl = '0;
      @(negedge clk);
    end
    check(ch_valid, 0, "valid drops after burst");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk); h_we = 1; h_addr = GA_W'({b[1:0], a[7:0]}); h_wdata = GM_DW'(pat(b, a));
      end
    @(negedge clk); h_we = 0;
    burst(0, 40);
    @(negedge clk); h_we = 1; h_addr = {2'd2, 8'd0}; h_wdata = 16'd1;
    @(negedge clk); h_we = 0; h_addr = {2'd2, 8'd0};
    @(negedge clk); check(h_rdata, 1, "buffer select read back");
    burst(1, 40);
    h_addr = {2'd1, 8'd77}; @(negedge clk);
    check(h_rdata, pat(1, 77), "host read of buffer 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
