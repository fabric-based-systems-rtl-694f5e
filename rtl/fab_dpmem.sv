// fab_dpmem: dual-port local memory of a cell. The local memories of all cells
// together form the global memory that the host processor loads and reads.
//
// Cell port (driven by the sequencer's memory control signals, memctl_t):
// the address comes from an internal counter. en accesses the word at the
// counter and then advances it, so consecutive cycles walk consecutive
// addresses (sequential access); the counter wraps at DEPTH (circular
// access); rst_cnt clears it and load_cnt loads it from the control word's
// operand (random access under program control). With idx set the access
// uses a second address register, the index register, instead (loaded by
// load_idx, advanced after each indexed access), so a cell can read one
// region sequentially and write results to another. rw=1 writes wdata, the
// read data rdata is the word currently addressed (combinational).
// Host port: random access, write in the cycle of h_we, read data registered
// (available the cycle after the address).
// A same-address write from both ports in one cycle keeps the cell's word.
// soft_rst (the fabric reset) clears both address registers, not the data.
// The access options (sequential, circular, indexed, random) follow the
// module library of the fabric generator; their encoding is this design's.
module fab_dpmem
  import fbs_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int W     = DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     soft_rst,
  // cell port
  input  memctl_t                  mc,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata,
  // host port
  input  logic                     h_we,
  input  logic [$clog2(DEPTH)-1:0] h_addr,
  input  logic [W-1:0]             h_wdata,
  output logic [W-1:0]             h_rdata
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] cnt, idx, addr;

  assign addr  = mc.idx ? idx : cnt;
  assign rdata = mem[addr];

  // address registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      idx <= '0;
    end else if (soft_rst) begin
      cnt <= '0;
      idx <= '0;
    end else begin
      if (mc.rst_cnt)              cnt <= '0;
      else if (mc.load_cnt)        cnt <= AW'(mc.operand);
      else if (mc.en && !mc.idx)   cnt <= cnt + 1'b1;
      if (mc.load_idx)             idx <= AW'(mc.operand);
      else if (mc.en && mc.idx)    idx <= idx + 1'b1;
    end
  end

  // storage: host write first, cell write last so the cell wins a collision
  always_ff @(posedge clk) begin
    if (h_we)            mem[h_addr] <= h_wdata;
    if (mc.en && mc.rw)  mem[addr]   <= wdata;
    h_rdata <= mem[h_addr];
  end

endmodule
