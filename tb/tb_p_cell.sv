// tb_p_cell: self-checking test of the linear-array end cell P_0.
// The read memory is loaded with a pattern through the host port. A burst of
// put_ch must present the pattern on the output channel one cycle after each
// put, while simultaneously get_ch stores a random input stream into the
// store memory, which is then read back through the host port.
module tb_p_cell;
  import fbs_pkg::*;
  localparam int DEPTH = 256, N = 50;

  logic clk = 0, rst_n = 0, soft_rst = 0;
  logic [CTRL_W-1:0] ctrl = '0;
  logic [DATA_W-1:0] in_data = '0, out_data;
  logic in_valid = 0, out_valid;
  logic h_we = 0;
  logic [GA_W-1:0] h_addr = '0;
  logic [GM_DW-1:0] h_wdata = '0, h_rdata;
  logic [7:0] inv [N];
  int checks = 0, failures = 0;

  p_cell #(.DEPTH(DEPTH)) dut (.*);
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

  initial begin
    p_ctrl_t c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < N; a++) begin
      @(negedge clk); h_we = 1; h_addr = GA_W'(a); h_wdata = GM_DW'(8'(a ^ 8'h5A));
    end
    @(negedge clk); h_we = 0;
    c = '0; c.put_ch = 1; c.mr.en = 1; c.get_ch = 1; c.ms.en = 1; c.ms.rw = 1; ctrl = c;
    for (int k = 0; k < N; k++) begin
      inv[k] = 8'($urandom); in_data = inv[k]; in_valid = 1;
      @(negedge clk);
      check(out_valid, 1, "output valid");
      check(out_data, 8'(k ^ 8'h5A), $sformatf("output word %0d", k));
    end
    ctrl = '0; in_valid = 0;
    for (int a = 0; a < N; a++) begin
      h_addr = GA_W'({2'd1, a[7:0]}); @(negedge clk);
      check(h_rdata, inv[a], $sformatf("stored word %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
