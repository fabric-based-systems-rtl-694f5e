// dma_ctrl: DMA and fabric controller between the processor's dual-port RAM
// and a fabric's global memory.
//
// The processor writes parameters and a command into registers (through the
// slave controller) and the controller carries it out on its own:
//   reg 0 CMD      write: [2:0] command; read: status (as reg 5)
//   reg 1 RAM_ADDR 16-bit word address in the dual-port RAM
//   reg 2 PROC     cell number (data) or sequencer number (program)
//   reg 3 GM_ADDR  address inside the cell / program ({index, part})
//   reg 4 LEN      number of 16-bit words
//   reg 5 STATUS   [0] busy, [1] fabric idle (every sequencer waits for start)
// Commands: 1 copy RAM -> cell memories (WR_Data), 2 copy RAM -> sequencer
// program (WR_Program), 3 copy cell memories -> RAM (RD_Data), 4 reset the
// fabric (one-cycle Reset_Fabric), 5 start the fabric (one-cycle
// Start_Fabric). Commands written while busy are ignored.
// Copies move one word every two cycles: RAM read then fabric write, or
// fabric read then RAM write. Each word goes to GM_ADDR+i of the same cell,
// and RAM_ADDR+i of the RAM. The RAM port has a one-cycle read latency, as
// has the fabric.
// The signal set towards the fabric (cell address, global-memory address,
// data, WR_Data, RD_Data, WR_Program, Reset_Fabric, Start_Fabric) and the
// 16-bit RAM data path follow the system diagram; registers, commands and
// timing are this design's.
module dma_ctrl
  import fbs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register port
  input  logic              reg_we,
  input  logic [2:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  // dual-port RAM, controller side (16-bit words)
  output logic [14:0]       dp_addr,
  output logic              dp_rd,
  output logic              dp_wr,
  output logic [15:0]       dp_wdata,
  input  logic [15:0]       dp_rdata,
  // fabric global memory
  output gm_req_t           gm_req,
  input  gm_rsp_t           gm_rsp
);
  typedef enum logic [2:0] {
    CMD_NONE = 3'd0, CMD_LOAD_DATA = 3'd1, CMD_LOAD_PROG = 3'd2,
    CMD_READ_DATA = 3'd3, CMD_RESET = 3'd4, CMD_START = 3'd5
  } cmd_e;

  typedef enum logic [2:0] {
    S_IDLE, S_RAM_RD, S_FAB_WR, S_FAB_RD, S_RAM_WR, S_PULSE
  } state_e;

  state_e             state;
  cmd_e               cmd;
  logic [14:0]        ram_addr;
  logic [PROC_W-1:0]  proc;
  logic [GA_W-1:0]    gm_addr;
  logic [15:0]        len, left;
  logic [14:0]        cur_ram;
  logic [GA_W-1:0]    cur_gm;
  logic               busy;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cmd      <= CMD_NONE;
      ram_addr <= '0;
      proc     <= '0;
      gm_addr  <= '0;
      len      <= '0;
      left     <= '0;
      cur_ram  <= '0;
      cur_gm   <= '0;
    end else begin
      if (reg_we && !busy) begin
        unique case (reg_addr)
          3'd1: ram_addr <= reg_wdata[14:0];
          3'd2: proc     <= reg_wdata[PROC_W-1:0];
          3'd3: gm_addr  <= reg_wdata[GA_W-1:0];
          3'd4: len      <= reg_wdata[15:0];
          default: ;
        endcase
      end
      unique case (state)
        S_IDLE: if (reg_we && reg_addr == 3'd0) begin
          cmd     <= cmd_e'(reg_wdata[2:0]);
          cur_ram <= ram_addr;
          cur_gm  <= gm_addr;
          left    <= len;
          unique case (cmd_e'(reg_wdata[2:0]))
            CMD_LOAD_DATA, CMD_LOAD_PROG: if (len != 0) state <= S_RAM_RD;
            CMD_READ_DATA:                if (len != 0) state <= S_FAB_RD;
            CMD_RESET, CMD_START:         state <= S_PULSE;
            default: ;
          endcase
        end
        S_RAM_RD: state <= S_FAB_WR;
        S_FAB_WR: begin
          cur_ram <= cur_ram + 1'b1;
          cur_gm  <= cur_gm + 1'b1;
          left    <= left - 1'b1;
          state   <= (left == 16'd1) ? S_IDLE : S_RAM_RD;
        end
        S_FAB_RD: state <= S_RAM_WR;
        S_RAM_WR: begin
          cur_ram <= cur_ram + 1'b1;
          cur_gm  <= cur_gm + 1'b1;
          left    <= left - 1'b1;
          state   <= (left == 16'd1) ? S_IDLE : S_FAB_RD;
        end
        S_PULSE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // RAM side
  assign dp_addr  = cur_ram;
  assign dp_rd    = (state == S_RAM_RD);
  assign dp_wr    = (state == S_RAM_WR);
  assign dp_wdata = gm_rsp.rdata;

  // fabric side
  always_comb begin
    gm_req         = '0;
    gm_req.proc    = proc;
    gm_req.addr    = cur_gm;
    gm_req.wdata   = dp_rdata;
    gm_req.wr_data = (state == S_FAB_WR) && (cmd == CMD_LOAD_DATA);
    gm_req.wr_prog = (state == S_FAB_WR) && (cmd == CMD_LOAD_PROG);
    gm_req.rd_data = (state == S_FAB_RD);
    gm_req.reset   = (state == S_PULSE) && (cmd == CMD_RESET);
    gm_req.start   = (state == S_PULSE) && (cmd == CMD_START);
  end

  // register read
  always_comb begin
    unique case (reg_addr)
      3'd1:    reg_rdata = 32'(ram_addr);
      3'd2:    reg_rdata = 32'(proc);
      3'd3:    reg_rdata = 32'(gm_addr);
      3'd4:    reg_rdata = 32'(len);
      default: reg_rdata = {30'd0, gm_rsp.idle, busy};
    endcase
  end

  // the controller never reads and writes the RAM in the same cycle
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(dp_rd && dp_wr))
    else $error("dma_ctrl: RAM read and write in the same cycle");

endmodule
