// tb_ele_cell: self-checking test of the linear-array element.
// Random words are applied on both inputs. With the multiplexers set to
// forward, each output must carry the opposite input one cycle later with
// its valid bit; with mem_l (or mem_r) set, that output must carry the
// memory words in address order instead.
module tb_ele_cell;
  import fbs_pkg::*;
  localparam int DEPTH = 256;

  logic clk = 0, rst_n = 0, soft_rst = 0;
  logic [CTRL_W-1:0] ctrl = '0;
  logic [DATA_W-1:0] in_l_data = '0, in_r_data = '0, out_l_data, out_r_data;
  logic in_l_valid = 0, in_r_valid = 0, out_l_valid, out_r_valid;
  logic h_we = 0;
  logic [GA_W-1:0] h_addr = '0;
  logic [GM_DW-1:0] h_wdata = '0, h_rdata;
  int checks = 0, failures = 0;

  ele_cell #(.DEPTH(DEPTH)) dut (.*);
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
    ele_ctrl_t c;
    logic [7:0] l, r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); h_we = 1; h_addr = GA_W'(a); h_wdata = GM_DW'(8'(200 - a));
    end
    @(negedge clk); h_we = 0;
    // forwarding both ways
    c = '0; c.put_l = 1; c.put_r = 1; ctrl = c;
    for (int k = 0; k < 20; k++) begin
      l = 8'($urandom); r = 8'($urandom);
      in_l_data = l; in_r_data = r; in_l_valid = 1; in_r_valid = (k % 3 != 0);
      @(negedge clk);
      check(out_l_data, r, "leftward forwards right input");
      check(out_r_data, l, "rightward forwards left input");
      check(out_l_valid, (k % 3 != 0), "leftward valid follows source");
      check(out_r_valid, 1, "rightward valid");
    end
    // memory on the leftward output, forwarding on the rightward one
    c = '0; c.m.rst_cnt = 1; ctrl = c; @(negedge clk);
    c = '0; c.put_l = 1; c.put_r = 1; c.mem_l = 1; c.m.en = 1; ctrl = c;
    for (int k = 0; k < 20; k++) begin
      l = 8'($urandom); in_l_data = l; in_r_data = ~l;
      @(negedge clk);
      check(out_l_data, (200 - k) & 255, $sformatf("leftward memory word %0d", k));
      check(out_l_valid, 1, "memory word valid");
      check(out_r_data, l, "rightward still forwards");
    end
    // memory on the rightward output
    c = '0; c.m.rst_cnt = 1; ctrl = c; @(negedge clk);
    c = '0; c.put_r = 1; c.mem_r = 1; c.m.en = 1; ctrl = c;
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      check(out_r_data, (200 - k) & 255, $sformatf("rightward memory word %0d", k));
    end
    ctrl = '0; @(negedge clk);
    check(out_l_valid, 0, "no put, no valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
