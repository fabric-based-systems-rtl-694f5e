// slave_ctrl: AHB slave through which the processor reaches the fabric
// controller.
//
// The processor's bus bridge acts as an AHB master on the programmable-logic
// side; this block is the slave that decodes its transfers into register
// accesses of the DMA controller (reg_* port). It follows the AHB-Lite
// two-phase protocol: the address phase (HSEL, HTRANS NONSEQ/SEQ, HREADY) is
// registered, and in the following data phase a write presents HWDATA with
// reg_we, while a read returns reg_rdata on HRDATA. Transfers are always
// zero-wait (HREADYOUT=1) and always OKAY; only 32-bit word accesses are
// meaningful (HADDR[4:2] selects one of eight registers, HSIZE is ignored).
// The block itself is only named with its 32-bit data, WR and RD signals;
// the choice of AHB-Lite and its register map are this design's.
module slave_ctrl (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic        hresp,
  output logic [31:0] hrdata,
  // register port of the DMA controller
  output logic        reg_we,
  output logic        reg_re,
  output logic [2:0]  reg_addr,
  output logic [31:0] reg_wdata,
  input  logic [31:0] reg_rdata
);
  logic       dp_active, dp_write;
  logic [2:0] dp_addr;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_active <= 1'b0;
      dp_write  <= 1'b0;
      dp_addr   <= '0;
    end else if (hready) begin
      dp_active <= hsel && htrans[1];
      dp_write  <= hwrite;
      dp_addr   <= haddr[4:2];
    end
  end

  assign reg_we    = dp_active && dp_write;
  assign reg_re    = dp_active && !dp_write;
  assign reg_addr  = dp_addr;
  assign reg_wdata = hwdata;
  assign hrdata    = reg_rdata;
  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

endmodule
