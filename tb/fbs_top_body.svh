// fbs_top_body.svh: body shared by the reduced-size and the full-size
// end-to-end tests of fbs_top. The including module declares the localparams
// KM_N, KM_D, MF_N, MF_D, MF_NP, BC_N, BC_L, LIN_L, NPIX and instantiates
// fbs_top as 'dut' on the signals declared here.
//
// The test plays the processor: it writes the dual-port RAM models directly
// and drives every other step over the AHB ports: DMA copies into cell
// memories, sequencer programs and the Send buffer select, fabric reset and
// start, polling of the status register, DMA read-back of results, which
// are then compared with reference values computed here.
//   system 0  K-means: two buffers of NPIX pixels; class and distance of
//             every pixel against a reference search (includes a tie).
//   system 1  matched filter: inner products of every filter and pixel.
//   system 2  broadcast example: m1 = vector + m0 in every cell, then a new
//             Receive program of half the length is loaded and used.
//   system 3  linear array: the words return to P_0 after the round trip.
// Each mechanism (AHB write/read, the three DMA copies, reset, start,
// buffer switch, program reload, tie) is counted and must happen at least
// once. The busy time of every start is measured on the fabric's idle
// signal and compared with the latency of each fabric's default program.

  logic        clk = 0, rst_n = 0;
  logic        hsel [4], hwrite [4], hready [4], hreadyout [4], hresp [4];
  logic [31:0] haddr [4], hwdata [4], hrdata [4];
  logic [1:0]  htrans [4];
  logic [14:0] dp_addr [4];
  logic        dp_rd [4], dp_wr [4];
  logic [15:0] dp_wdata [4], dp_rdata [4];

  int checks = 0, failures = 0;
  int n_ahb_wr = 0, n_ahb_rd = 0, n_load = 0, n_prog = 0, n_readback = 0;
  int n_reset = 0, n_start = 0, n_bufswitch = 0, n_reload = 0, n_tie = 0;
  int busy_len [4], busy_cnt [4];

  always #5 clk = ~clk;

  dpram_model u_ram0 (.clk, .b_addr(dp_addr[0]), .b_rd(dp_rd[0]), .b_wr(dp_wr[0]), .b_wdata(dp_wdata[0]), .b_rdata(dp_rdata[0]));
  dpram_model u_ram1 (.clk, .b_addr(dp_addr[1]), .b_rd(dp_rd[1]), .b_wr(dp_wr[1]), .b_wdata(dp_wdata[1]), .b_rdata(dp_rdata[1]));
  dpram_model u_ram2 (.clk, .b_addr(dp_addr[2]), .b_rd(dp_rd[2]), .b_wr(dp_wr[2]), .b_wdata(dp_wdata[2]), .b_rdata(dp_rdata[2]));
  dpram_model u_ram3 (.clk, .b_addr(dp_addr[3]), .b_rd(dp_rd[3]), .b_wr(dp_wr[3]), .b_wdata(dp_wdata[3]), .b_rdata(dp_rdata[3]));

  // busy time of each fabric, measured on its idle signal
  for (genvar s = 0; s < 4; s++) begin : g_busy
    always @(posedge clk) begin
      if (!dut.gm_rsp[s].idle) busy_cnt[s] <= busy_cnt[s] + 1;
      else if (busy_cnt[s] != 0) begin busy_len[s] <= busy_cnt[s]; busy_cnt[s] <= 0; end
    end
  end

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic ram_wr(int s, int a, int v);
    case (s)
      0: u_ram0.write16(a, 16'(v));
      1: u_ram1.write16(a, 16'(v));
      2: u_ram2.write16(a, 16'(v));
      default: u_ram3.write16(a, 16'(v));
    endcase
  endtask

  function automatic int ram_rd(int s, int a);
    case (s)
      0: return int'(u_ram0.read16(a));
      1: return int'(u_ram1.read16(a));
      2: return int'(u_ram2.read16(a));
      default: return int'(u_ram3.read16(a));
    endcase
  endfunction

  task automatic ahb_write(int s, int r, int v);
    @(negedge clk);
    hsel[s] = 1; htrans[s] = 2'b10; hwrite[s] = 1; haddr[s] = 32'(r * 4);
    @(negedge clk);
    hsel[s] = 0; htrans[s] = 2'b00; hwdata[s] = 32'(v);
    @(negedge clk);
    n_ahb_wr++;
  endtask

  task automatic ahb_read(int s, int r, output int v);
    @(negedge clk);
    hsel[s] = 1; htrans[s] = 2'b10; hwrite[s] = 0; haddr[s] = 32'(r * 4);
    @(negedge clk);
    hsel[s] = 0; htrans[s] = 2'b00;
    v = int'(hrdata[s]);
    n_ahb_rd++;
  endtask

  task automatic dma(int s, int cmd, int ram = 0, int proc = 0, int gm = 0, int len = 0);
    int st;
    if (cmd <= 3) begin
      ahb_write(s, 1, ram); ahb_write(s, 2, proc); ahb_write(s, 3, gm); ahb_write(s, 4, len);
    end
    ahb_write(s, 0, cmd);
    do ahb_read(s, 5, st); while (st[0]);
    case (cmd)
      1: n_load++;
      2: n_prog++;
      3: n_readback++;
      4: n_reset++;
      default: n_start++;
    endcase
  endtask

  task automatic run_fabric(int s);
    int st;
    dma(s, 5);
    do ahb_read(s, 5, st); while (!st[1]);
    @(negedge clk);                      // let the busy-time monitor settle
  endtask

  // ------------------------------------------------------------ K-means
  task automatic test_kmeans();
    localparam int S = 0;
    logic [7:0] ctr [KM_N][KM_D];
    logic [7:0] px [KM_D];
    int best, cls, dsum;
    foreach (ctr[c, k]) ctr[c][k] = 8'($urandom);
    for (int k = 0; k < KM_D; k++) ctr[KM_N-1][k] = ctr[1][k];      // equal centres
    for (int c = 0; c < KM_N; c++) begin
      for (int k = 0; k < KM_D; k++) ram_wr(S, 1000 + c * KM_D + k, ctr[c][k]);
      dma(S, 1, 1000 + c * KM_D, 1 + c, 0, KM_D);
    end
    for (int b = 0; b < 2; b++)
      for (int p = 0; p < NPIX; p++)
        for (int k = 0; k < KM_D; k++)
          ram_wr(S, 20000 + b * 256 + p * KM_D + k,
                 (b == 0 && p == 0) ? int'(ctr[1][k]) : int'(($urandom * (p + 3) + k) & 255));
    dma(S, 1, 20000, 0, 'h000, NPIX * KM_D);
    dma(S, 1, 20256, 0, 'h100, NPIX * KM_D);
    for (int b = 0; b < 2; b++) begin
      ram_wr(S, 19999, b);
      dma(S, 1, 19999, 0, 'h200, 1);               // Send buffer select
      n_bufswitch++;
      dma(S, 4);                                   // fabric reset
      for (int p = 0; p < NPIX; p++) begin
        run_fabric(S);
        check(busy_len[S], KM_D + KM_N + 5, "K-means busy cycles per pixel");
        dma(S, 3, 30000, KM_N + 1, 0, 2);          // read Res_0
        for (int k = 0; k < KM_D; k++) px[k] = 8'(ram_rd(S, 20000 + b * 256 + p * KM_D + k));
        best = 1 << 30; cls = 0;
        for (int c = 0; c < KM_N; c++) begin
          dsum = 0;
          for (int k = 0; k < KM_D; k++) dsum += (ctr[c][k] > px[k]) ? ctr[c][k] - px[k] : px[k] - ctr[c][k];
          if (dsum < best) begin best = dsum; cls = c; end
        end
        if (b == 0 && p == 0) begin check(best, 0, "tie pixel on two centres"); n_tie++; end
        check(ram_rd(S, 30000), best, $sformatf("K-means block %0d pixel %0d distance", b, p));
        check(ram_rd(S, 30001), cls, $sformatf("K-means block %0d pixel %0d class", b, p));
      end
    end
  endtask

  // ------------------------------------------------------ matched filter
  task automatic test_mf();
    localparam int S = 1;
    logic signed [7:0] q [MF_N][MF_D];
    logic signed [7:0] px [MF_NP][MF_D];
    int exp;
    foreach (q[i, k]) q[i][k] = 8'($urandom);
    foreach (px[p, k]) px[p][k] = 8'($urandom);
    for (int i = 0; i < MF_N; i++) begin
      for (int k = 0; k < MF_D; k++) ram_wr(S, 1000 + k, 8'(q[i][k]));
      dma(S, 1, 1000, 1 + i, 0, MF_D);
    end
    for (int p = 0; p < MF_NP; p++)
      for (int k = 0; k < MF_D; k++) ram_wr(S, 8000 + p * MF_D + k, 8'(px[p][k]));
    dma(S, 1, 8000, 0, 'h000, MF_NP * MF_D);
    ram_wr(S, 7999, 0);
    dma(S, 1, 7999, 0, 'h200, 1);
    n_bufswitch++;
    dma(S, 4);
    run_fabric(S);
    check(busy_len[S], MF_NP * (MF_D + 3) + 1, "matched-filter busy cycles per block");
    for (int i = 0; i < MF_N; i++) begin
      dma(S, 3, 12000, 1 + i, MF_D, 2 * MF_NP);
      for (int p = 0; p < MF_NP; p++) begin
        exp = 0;
        for (int k = 0; k < MF_D; k++) exp += int'(q[i][k]) * int'(px[p][k]);
        check((ram_rd(S, 12000 + 2 * p + 1) << 8) | ram_rd(S, 12000 + 2 * p), exp & 'hFFFF,
              $sformatf("filter %0d pixel %0d", i, p));
      end
    end
  endtask

  // ---------------------------------------------------- broadcast example
  task automatic test_bcast();
    localparam int S = 2;
    localparam int L2 = BC_L / 2;
    logic [7:0] v [BC_L], v2 [BC_L];
    fbs_pkg::prog_t np;
    foreach (v[k]) begin v[k] = 8'($urandom); v2[k] = 8'($urandom); end
    for (int k = 0; k < BC_L; k++) ram_wr(S, 1000 + k, v[k]);
    dma(S, 1, 1000, 0, 0, BC_L);
    for (int i = 0; i < BC_N; i++) begin
      for (int k = 0; k < BC_L; k++) ram_wr(S, 2000 + k, (i * 37 + k * 11) & 255);
      dma(S, 1, 2000, 1 + i, 'h000, BC_L);
    end
    dma(S, 4);
    run_fabric(S);
    check(busy_len[S], BC_L + 1, "broadcast busy cycles");
    // new Receive program: half the length
    np = fbs_pkg::rec_prog(L2);
    for (int j = 0; j < 4 * fbs_pkg::SEQ_DEPTH; j++) ram_wr(S, 6000 + j, np[j / 4][(j % 4) * 16 +: 16]);
    dma(S, 2, 6000, 1, 0, 4 * fbs_pkg::SEQ_DEPTH);
    for (int k = 0; k < BC_L; k++) ram_wr(S, 1000 + k, v2[k]);
    dma(S, 1, 1000, 0, 0, BC_L);
    run_fabric(S);
    n_reload++;
    for (int i = 0; i < BC_N; i++) begin
      dma(S, 3, 4000, 1 + i, 'h100, BC_L);
      for (int k = 0; k < BC_L; k++)
        check(ram_rd(S, 4000 + k), 8'((k < L2 ? v2[k] : v[k]) + 8'((i * 37 + k * 11) & 255)),
              $sformatf("Rec %0d word %0d", i, k));
    end
  endtask

  // ---------------------------------------------------- linear array
  task automatic test_linear();
    localparam int S = 3;
    logic [7:0] w [LIN_L];
    foreach (w[k]) begin w[k] = 8'($urandom); ram_wr(S, 1000 + k, w[k]); end
    dma(S, 1, 1000, 0, 'h000, LIN_L);
    dma(S, 4);
    run_fabric(S);
    check(busy_len[S], LIN_L + 7, "linear array busy cycles");
    dma(S, 3, 3000, 0, 'h100, LIN_L);
    for (int k = 0; k < LIN_L; k++) check(ram_rd(S, 3000 + k), w[k], $sformatf("round trip word %0d", k));
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      hsel[s] = 0; hwrite[s] = 0; hready[s] = 1; haddr[s] = '0; hwdata[s] = '0; htrans[s] = '0;
      busy_len[s] = 0; busy_cnt[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    test_kmeans();
    test_mf();
    test_bcast();
    test_linear();
    check(n_ahb_wr > 0, 1, "AHB writes happened");
    check(n_ahb_rd > 0, 1, "AHB reads happened");
    check(n_load > 0, 1, "DMA data loads happened");
    check(n_prog > 0, 1, "DMA program load happened");
    check(n_readback > 0, 1, "DMA read-backs happened");
    check(n_reset > 0, 1, "fabric resets happened");
    check(n_start > 0, 1, "fabric starts happened");
    check(n_bufswitch > 0, 1, "buffer switches happened");
    check(n_reload > 0, 1, "program reload used");
    check(n_tie > 0, 1, "K-means tie exercised");
    $display("mechanisms: ahb_wr=%0d ahb_rd=%0d load=%0d prog=%0d readback=%0d reset=%0d start=%0d bufswitch=%0d reload=%0d tie=%0d",
             n_ahb_wr, n_ahb_rd, n_load, n_prog, n_readback, n_reset, n_start, n_bufswitch, n_reload, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
