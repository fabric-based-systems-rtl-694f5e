// fbs_pkg: types and constants shared by the Fabric-Based System.
//
// A fabric is an array of datapath cells. Each cell's datapath is driven by a
// control word that a microcoded sequencer emits every cycle; one sequencer may
// drive one cell or a whole group of identical cells. This package defines:
//   * the sequencer micro-instruction (uinstr_t): a 32-bit control word plus a
//     flow operation (next, wait_cycles, wait_start, jmp, EndLoop, branch on a
//     datapath condition), following the assembler directives of the
//     generated program template;
//   * the control-word layout of every cell type (which bit drives which
//     hidden signal of the datapath: memory access, counter reset/load,
//     channel put/get, accumulator clear ...);
//   * the global-memory bus between the DMA controller and a fabric
//     (gm_req_t / gm_rsp_t);
//   * the default microprograms of each sequencer, built by functions. They
//     play the part of the assembler output and are the reset contents of each
//     sequencer's program store; the host may overwrite them.
// The field widths (32-bit control word, 16-entry program, 16-bit host data
// bus) are this design's choice; the 8-bit data path and 256-word cell
// memories follow the described fabrics.
package fbs_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int DATA_W   = 8;    // cell data width (8-bit pixels/coefficients)
  localparam int MEM_AW   = 8;    // cell memory address width (256 words)
  localparam int CTRL_W   = 32;   // sequencer control word width
  localparam int SEQ_DEPTH = 16;  // micro-instructions per sequencer
  localparam int SEQ_AW   = 4;
  localparam int GM_DW    = 16;   // global-memory (host) data bus width
  localparam int PROC_W   = 9;    // cell / sequencer number on the global bus
  localparam int GA_W     = 10;   // address inside a cell: {region[1:0], word[7:0]}
  localparam int DIST_W   = 16;   // K-means distance width
  localparam int IDX_W    = 8;    // K-means class index width
  localparam int ACC_W    = 16;   // matched-filter accumulator width

  // ------------------------------------------------------- micro-instruction
  typedef enum logic [3:0] {
    OP_NEXT       = 4'd0,  // one cycle, then the next instruction
    OP_WAIT       = 4'd1,  // wait_cycles count: hold for count cycles
    OP_WAIT_START = 4'd2,  // wait_start label: hold until start, then jump
    OP_JMP        = 4'd3,  // jmp label
    OP_LOOP       = 4'd4,  // EndLoop label count: run the body count times (0 = forever)
    OP_JCOND      = 4'd5   // jump to label if condition bit 'cond' is set
  } seq_op_e;

  typedef struct packed {
    logic [CTRL_W-1:0] ctrl;    // datapath control word, zero = all signals off
    logic [15:0]       count;   // wait_cycles / EndLoop count
    logic [7:0]        target;  // label (instruction index)
    logic [3:0]        cond;    // condition bit index for OP_JCOND
    seq_op_e           op;
  } uinstr_t;                   // 64 bits: loaded by the host as four 16-bit parts

  typedef uinstr_t [SEQ_DEPTH-1:0] prog_t;

  function automatic uinstr_t ui(seq_op_e op, logic [CTRL_W-1:0] ctrl,
                                 int count = 0, int target = 0, int cond = 0);
    uinstr_t u;
    u.ctrl   = ctrl;
    u.count  = 16'(count);
    u.target = 8'(target);
    u.cond   = 4'(cond);
    u.op     = op;
    return u;
  endfunction

  // ------------------------------------------------- cell-memory control
  // Hidden control signals of one dual-port memory module.
  typedef struct packed {
    logic [MEM_AW-1:0] operand;  // value for load_cnt / load_idx
    logic load_idx;              // index register <= operand
    logic idx;                   // this access uses (and post-increments) the index register
    logic load_cnt;              // MLoadCounter: counter <= operand
    logic rst_cnt;               // MResetCounter: counter <= 0
    logic rw;                    // MReadWrite: 1 = write
    logic en;                    // MEnableAcces: access, then advance the address
  } memctl_t;                    // 14 bits

  // ------------------------------------------- per-cell control words
  typedef struct packed { logic [2:0] rsv; logic get_ch; memctl_t m1; memctl_t m0; } rec_ctrl_t;
  typedef struct packed { logic [16:0] rsv; logic put_ch; memctl_t m; } send_ctrl_t;
  typedef struct packed { logic [14:0] rsv; logic put_ch; logic acc_clr; logic get_ch; memctl_t m; } dist_ctrl_t;
  typedef struct packed { logic [29:0] rsv; logic cmp; logic get_dist; } index_ctrl_t;
  typedef struct packed { logic [30:0] rsv; logic get; } res_ctrl_t;
  typedef struct packed { logic [14:0] rsv; logic wsel_hi; logic acc_clr; logic get_ch; memctl_t m; } mf_ctrl_t;
  typedef struct packed { logic [1:0] rsv; logic get_ch; logic put_ch; memctl_t ms; memctl_t mr; } p_ctrl_t;
  typedef struct packed { logic [13:0] rsv; logic put_l; logic put_r; logic mem_l; logic mem_r; memctl_t m; } ele_ctrl_t;

  // --------------------------------------------------- global-memory bus
  // Host side of the fabric: one request per cycle. wr_data/rd_data access a
  // cell's memories or registers ({region, word} in addr); wr_prog writes a
  // 16-bit part of a micro-instruction ({index, part} in addr) of the
  // sequencer numbered proc. reset and start are one-cycle pulses.
  typedef struct packed {
    logic [PROC_W-1:0] proc;
    logic [GA_W-1:0]   addr;
    logic [GM_DW-1:0]  wdata;
    logic wr_data;
    logic rd_data;
    logic wr_prog;
    logic reset;
    logic start;
  } gm_req_t;

  typedef struct packed {
    logic [GM_DW-1:0] rdata;   // valid the cycle after rd_data
    logic             idle;    // every sequencer of the fabric waits for start
  } gm_rsp_t;

  // Sequencer program write helper: is this request a program write to sequencer s?
  function automatic logic prog_wr_hit(gm_req_t r, int s);
    return r.wr_prog && (r.proc == PROC_W'(s));
  endfunction

  // ------------------------------------------------- default programs
  // Entry point (the StartProgram instruction) of every default program.
  // All programs share the shape "process ... ; start: wait_start process".

  // Receive cell (Send/Rec example): a single-cycle noop covering the channel
  // register, then n cycles of m1[i] <= channel + m0[i].
  localparam int REC_ENTRY = 2;
  function automatic prog_t rec_prog(int n);
    prog_t p = '0;
    rec_ctrl_t c;
    c = '0;                                    p[0] = ui(OP_NEXT, c);
    c = '0; c.get_ch = 1; c.m0.en = 1; c.m1.en = 1; c.m1.rw = 1;
                                               p[1] = ui(OP_WAIT, c, n);
    c = '0; c.m0.rst_cnt = 1; c.m1.rst_cnt = 1; p[2] = ui(OP_WAIT_START, c, 0, 0);
    return p;
  endfunction

  // Send cell broadcasting n words in one burst (Send/Rec example).
  localparam int SEND_ENTRY = 1;
  function automatic prog_t send_burst_prog(int n);
    prog_t p = '0;
    send_ctrl_t c;
    c = '0; c.put_ch = 1; c.m.en = 1;          p[0] = ui(OP_WAIT, c, n);
    c = '0; c.m.rst_cnt = 1;                   p[1] = ui(OP_WAIT_START, c, 0, 0);
    return p;
  endfunction

  // K-means, one pixel of d components per start. Cycle 0 is the first cycle
  // after start. Send puts the components in cycles 0..d-1 and keeps its
  // address counter between pixels (the counter is cleared by the fabric
  // reset), so successive starts walk through the pixel buffer.
  function automatic prog_t km_send_prog(int d);
    prog_t p = '0;
    send_ctrl_t c;
    c = '0; c.put_ch = 1; c.m.en = 1;          p[0] = ui(OP_WAIT, c, d);
    c = '0;                                    p[1] = ui(OP_WAIT_START, c, 0, 0);
    return p;
  endfunction

  // Dist: gets components in cycles 1..d, accumulator final in cycle d+2,
  // distance put in cycle d+2 (valid on the channel from d+3).
  localparam int KM_DIST_ENTRY = 4;
  function automatic prog_t km_dist_prog(int d);
    prog_t p = '0;
    dist_ctrl_t c;
    c = '0; c.acc_clr = 1;                     p[0] = ui(OP_NEXT, c);
    c = '0; c.get_ch = 1; c.m.en = 1;          p[1] = ui(OP_WAIT, c, d);
    c = '0;                                    p[2] = ui(OP_NEXT, c);
    c = '0; c.put_ch = 1;                      p[3] = ui(OP_NEXT, c);
    c = '0; c.m.rst_cnt = 1; c.acc_clr = 1;    p[4] = ui(OP_WAIT_START, c, 0, 0);
    return p;
  endfunction

  // Index (shared by Index_0..N-2 and used by Index_N-1): take the own
  // distance in cycle d+3, then compare/forward for n cycles (d+4..d+n+3).
  localparam int KM_INDEX_ENTRY = 3;
  function automatic prog_t km_index_prog(int d, int n);
    prog_t p = '0;
    index_ctrl_t c;
    c = '0;                                    p[0] = ui(OP_WAIT, c, d + 3);
    c = '0; c.get_dist = 1;                    p[1] = ui(OP_NEXT, c);
    c = '0; c.cmp = 1;                         p[2] = ui(OP_WAIT, c, n);
    c = '0;                                    p[3] = ui(OP_WAIT_START, c, 0, 0);
    return p;
  endfunction

  // Res: capture (min distance, index) from Index_0 in cycle d+n+4.
  localparam int KM_RES_ENTRY = 2;
  function automatic prog_t km_res_prog(int d, int n);
    prog_t p = '0;
    res_ctrl_t c;
    c = '0;                                    p[0] = ui(OP_WAIT, c, d + n + 4);
    c = '0; c.get = 1;                         p[1] = ui(OP_NEXT, c);
    c = '0;                                    p[2] = ui(OP_WAIT_START, c, 0, 0);
    return p;
  endfunction

  // Matched filter, a block of np pixels of d bands per start; one pixel
  // every d+3 cycles. Send: put d words, idle 2, EndLoop.
  localparam int MF_SEND_ENTRY = 3;
  function automatic prog_t mf_send_prog(int d, int np);
    prog_t p = '0;
    send_ctrl_t c;
    c = '0; c.put_ch = 1; c.m.en = 1;          p[0] = ui(OP_WAIT, c, d);
    c = '0;                                    p[1] = ui(OP_WAIT, c, 2);
    c = '0;                                    p[2] = ui(OP_LOOP, c, np, 0);
    c = '0; c.m.rst_cnt = 1;                   p[3] = ui(OP_WAIT_START, c, 0, 0);
    return p;
  endfunction

  // MF cell: coefficients at addresses 0..d-1, results (low byte, high byte)
  // written through the index register from address d upwards.
  localparam int MF_ENTRY = 5;
  function automatic prog_t mf_prog(int d, int np);
    prog_t p = '0;
    mf_ctrl_t c;
    c = '0; c.m.load_idx = 1; c.m.operand = MEM_AW'(d);
                                               p[0] = ui(OP_NEXT, c);
    c = '0; c.get_ch = 1; c.m.en = 1;          p[1] = ui(OP_WAIT, c, d);
    c = '0; c.m.rst_cnt = 1;                   p[2] = ui(OP_NEXT, c);
    c = '0; c.m.en = 1; c.m.rw = 1; c.m.idx = 1;
                                               p[3] = ui(OP_NEXT, c);
    c = '0; c.m.en = 1; c.m.rw = 1; c.m.idx = 1; c.wsel_hi = 1; c.acc_clr = 1;
                                               p[4] = ui(OP_LOOP, c, np, 1);
    c = '0; c.m.rst_cnt = 1; c.acc_clr = 1;    p[5] = ui(OP_WAIT_START, c, 0, 0);
    return p;
  endfunction

  // Linear array. P_0 sends n words from its read memory (cycles 0..n-1).
  // Data travels P_0 -> Ele_2 -> Ele_1 -> Ele_0, turns at the end of the
  // array and comes back Ele_0 -> Ele_1 -> Ele_2 -> P_0: 7 channel
  // registers, so P_0 stores words in cycles 7..n+6.
  localparam int LIN_HOPS = 7;
  localparam int P_ENTRY = 3;
  function automatic prog_t p_prog(int n);
    prog_t p = '0;
    p_ctrl_t c;
    c = '0; c.put_ch = 1; c.mr.en = 1;         p[0] = ui(OP_WAIT, c, LIN_HOPS);
    c = '0; c.put_ch = 1; c.mr.en = 1; c.get_ch = 1; c.ms.en = 1; c.ms.rw = 1;
                                               p[1] = ui(OP_WAIT, c, n - LIN_HOPS);
    c = '0; c.get_ch = 1; c.ms.en = 1; c.ms.rw = 1;
                                               p[2] = ui(OP_WAIT, c, LIN_HOPS);
    c = '0; c.mr.rst_cnt = 1; c.ms.rst_cnt = 1; p[3] = ui(OP_WAIT_START, c, 0, 0);
    return p;
  endfunction

  // Ele cells forward in both directions for the whole transfer. When
  // mem_sel is set, each cell replaces the leftward stream by its own memory
  // from cycle 3 on; only Ele_0's words survive the trip, and they reach P_0
  // in the same cycles (7..n+6) as a forwarded stream would.
  localparam int ELE_ENTRY = 2;
  function automatic prog_t ele_prog(int n, logic mem_sel);
    prog_t p = '0;
    ele_ctrl_t c;
    c = '0; c.put_l = 1; c.put_r = 1;          p[0] = ui(OP_WAIT, c, 3);
    c = '0; c.put_l = 1; c.put_r = 1; c.mem_l = mem_sel; c.m.en = mem_sel;
                                               p[1] = ui(OP_WAIT, c, n + LIN_HOPS - 3);
    c = '0; c.m.rst_cnt = 1;                   p[2] = ui(OP_WAIT_START, c, 0, 0);
    return p;
  endfunction

endpackage
