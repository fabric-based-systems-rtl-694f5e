// fab_sequencer: microcoded controller of one cell or of a group of identical
// cells (a shared sequencer gives SIMD operation; one per cell gives MIMD).
//
// Every cycle the instruction at the program counter drives its 32-bit control
// word onto the datapath (a signal not named in the instruction is zero), and
// its flow operation picks the next instruction:
//   OP_NEXT        one cycle, then pc+1 (a plain "Instr")
//   OP_WAIT        wait_cycles count: the same word for count cycles, then pc+1
//   OP_WAIT_START  wait_start label: hold until the start pulse, then jump
//   OP_JMP         jmp label
//   OP_LOOP        EndLoop label count: jump back to label until the body has
//                  run count times (count 0 = forever), then pc+1
//   OP_JCOND       jump to label if datapath condition bit cond is set
// After power-on reset or a fabric reset (soft_rst) the pc is ENTRY, the
// StartProgram instruction. The program store is reset to PROG, the
// assembled default program, and can be rewritten by the host at any time
// through a 16-bit port (prog_addr = {instruction index, part}), so new
// programs can be loaded while the fabric runs. A single loop counter
// serves EndLoop (no nested loops). waiting is high while the sequencer
// sits on a wait_start instruction; the host uses it to see that a phase
// has ended.
// Follows the described assembler directives and Receive program; the
// instruction encoding, the program size and the loadable store are this
// design's own choices.
module fab_sequencer
  import fbs_pkg::*;
#(
  parameter prog_t PROG  = '0,
  parameter int    ENTRY = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 soft_rst,
  input  logic                 start,
  input  logic [15:0]          cond,
  input  logic                 prog_we,
  input  logic [SEQ_AW+1:0]    prog_addr,
  input  logic [15:0]          prog_wdata,
  output logic [CTRL_W-1:0]    ctrl,
  output logic                 waiting
);

  prog_t               prog;
  logic [SEQ_AW-1:0]   pc;
  logic [15:0]         cnt;
  logic [15:0]         iter;
  uinstr_t             cur;

  assign cur     = prog[pc];
  assign ctrl    = cur.ctrl;
  assign waiting = (cur.op == OP_WAIT_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prog <= PROG;
      pc   <= SEQ_AW'(ENTRY);
      cnt  <= '0;
      iter <= '0;
    end else begin
      if (prog_we)
        prog[prog_addr[SEQ_AW+1:2]][prog_addr[1:0]*16 +: 16] <= prog_wdata;

      if (soft_rst) begin
        pc   <= SEQ_AW'(ENTRY);
        cnt  <= '0;
        iter <= '0;
      end else begin
        unique case (cur.op)
          OP_NEXT: pc <= pc + 1'b1;
          OP_WAIT: begin
            if (cur.count <= 16'd1 || cnt == cur.count - 16'd1) begin
              cnt <= '0;
              pc  <= pc + 1'b1;
            end else begin
              cnt <= cnt + 16'd1;
            end
          end
          OP_WAIT_START: if (start) pc <= cur.target[SEQ_AW-1:0];
          OP_JMP:        pc <= cur.target[SEQ_AW-1:0];
          OP_LOOP: begin
            if (cur.count == 16'd0) begin
              pc <= cur.target[SEQ_AW-1:0];
            end else if (iter >= cur.count - 16'd1) begin
              iter <= '0;
              pc   <= pc + 1'b1;
            end else begin
              iter <= iter + 16'd1;
              pc   <= cur.target[SEQ_AW-1:0];
            end
          end
          OP_JCOND: pc <= cond[cur.cond] ? cur.target[SEQ_AW-1:0] : pc + 1'b1;
          default:  pc <= pc + 1'b1;
        endcase
      end
    end
  end

endmodule
