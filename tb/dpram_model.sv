// dpram_model: behavioural model of the processor's 16K x 32-bit dual-port
// RAM, used by the testbenches only.
// Port A (processor) is 32 bits wide and accessed by the testbench through
// the tasks write32/read32 or the array; port B (fabric controller) sees the
// same storage as 32K 16-bit words (word 2i = bits 15:0 of entry i), with a
// write in the cycle of b_wr and read data registered one cycle after b_rd.
module dpram_model (
  input  logic        clk,
  input  logic [14:0] b_addr,
  input  logic        b_rd,
  input  logic        b_wr,
  input  logic [15:0] b_wdata,
  output logic [15:0] b_rdata
);
  logic [31:0] mem [16384];

  initial begin
    for (int i = 0; i < 16384; i++) mem[i] = '0;
    b_rdata = '0;
  end

  always @(posedge clk) begin
    if (b_wr) begin
      if (b_addr[0]) mem[b_addr[14:1]][31:16] <= b_wdata;
      else           mem[b_addr[14:1]][15:0]  <= b_wdata;
    end
    if (b_rd) b_rdata <= b_addr[0] ? mem[b_addr[14:1]][31:16] : mem[b_addr[14:1]][15:0];
  end

  // port A: 16-bit halves written by the processor
  task automatic write16(int waddr, logic [15:0] v);
    if (waddr % 2) mem[waddr / 2][31:16] = v;
    else           mem[waddr / 2][15:0]  = v;
  endtask

  function automatic logic [15:0] read16(int waddr);
    return (waddr % 2) ? mem[waddr / 2][31:16] : mem[waddr / 2][15:0];
  endfunction
endmodule
