// tb_rec_cell: self-checking test of the Receive cell.
// m0 is loaded with random bytes through the host port. A stream of random
// channel words is then applied with get_ch, m0 read and m1 write for n
// cycles, as the Receive program does; afterwards m1 is read through the
// host port and each word must equal channel word + m0 word (mod 256).
module tb_rec_cell;
  import fbs_pkg::*;
  localparam int DEPTH = 256, N = 200;

  logic clk = 0, rst_n = 0, soft_rst = 0;
  logic [CTRL_W-1:0] ctrl = '0;
  logic [DATA_W-1:0] ch_data = '0;
  logic ch_valid = 0;
  logic h_we = 0;
  logic [GA_W-1:0] h_addr = '0;
  logic [GM_DW-1:0] h_wdata = '0, h_rdata;
  logic [7:0] m0 [DEPTH], chv [N];
  int checks = 0, failures = 0;

  rec_cell #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rec_ctrl_t c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      m0[a] = 8'($urandom);
      @(negedge clk); h_we = 1; h_addr = GA_W'(a); h_wdata = GM_DW'(m0[a]);
    end
    @(negedge clk); h_we = 0;
    c = '0; c.m0.rst_cnt = 1; c.m1.rst_cnt = 1; ctrl = c;
    @(negedge clk);
    c = '0; c.get_ch = 1; c.m0.en = 1; c.m1.en = 1; c.m1.rw = 1; ctrl = c;
    for (int k = 0; k < N; k++) begin
      chv[k] = 8'($urandom); ch_data = chv[k]; ch_valid = 1;
      @(negedge clk);
    end
    ctrl = '0; ch_valid = 0;
    for (int a = 0; a < N; a++) begin
      h_addr = GA_W'({2'd1, a[7:0]});
      @(negedge clk);
      checks++;
      if (h_rdata[7:0] !== 8'(chv[a] + m0[a])) begin
        failures++;
        $display("FAIL m1[%0d]=%h expected %h", a, h_rdata[7:0], 8'(chv[a] + m0[a]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
