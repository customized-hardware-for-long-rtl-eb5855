// tb_lstm_top_body.svh: shared body of the end-to-end accelerator tests.
//
// Included by a testbench module that has declared localparams N_IN, N_HID,
// N_OUT, BATCH, BLOCK (matching the DUT), NB (batches to run) and the DUT
// named `dut` wired to the signals below. The body fills the memory model with
// input pairs in [0,1) and small random weights (plus one forget-gate weight
// row large enough to saturate accumulators), starts the accelerator, and
// compares every predicted class with a reference model that follows the
// algorithm step by step: Gaussian state seeding, batch-wide hidden-state
// products, input products accumulated column by column, PLAN gates, cell
// update carried from pair to pair, output layer, arg-max, and hand-over of
// the hidden state between batches. The final hidden and cell state are
// compared too. It counts how often each mechanism occurs (compute waiting
// for a buffer, a loader running a tile ahead, the hidden-state and input
// products overlapping, narrow last column tile, state hand-over,
// saturation, write back-pressure) and counts a failure for any that never
// occurs. Formats are the reference ones: <18,2> inputs, <14,6> elsewhere.

  import tb_ref_pkg::*;
  localparam int IN_W = 18, IN_F = 16, HID_W = 14, HF = 8, MEM_W = 14, MF = 8, CALC_W = 14, CF = 8;
  localparam int NJB = (N_IN + BLOCK - 1) / BLOCK, NKB = N_HID / BLOCK;
  localparam int NS  = NB * BATCH;
  // memory map
  localparam int XB  = 0;
  localparam int WIB = XB + NS * N_IN;
  localparam int WHB = WIB + 4 * N_HID * N_IN;
  localparam int WLB = WHB + 4 * N_HID * N_HID;
  localparam int BB  = WLB + N_OUT * N_HID;
  localparam int OB  = BB + 8 * N_HID + N_OUT;
  localparam int WORDS = OB + NS;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic [3:0][15:0] seed;
  logic [2:0] rd_req_valid, rd_req_ready, rd_rsp_valid;
  logic [2:0][31:0] rd_req_addr, rd_rsp_data;
  logic [2:0][15:0] rd_req_len;
  logic wr_valid, wr_ready;
  logic [31:0] wr_addr, wr_data;
  int checks = 0, failures = 0;

  tb_mem_model #(.NPORTS(3), .WORDS(WORDS), .LAT(5)) u_mem (
    .clk, .req_valid(rd_req_valid), .req_ready(rd_req_ready), .req_addr(rd_req_addr),
    .req_len(rd_req_len), .rsp_valid(rd_rsp_valid), .rsp_data(rd_rsp_data),
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ mechanism counters
  // state codes of lstm_top: 3 = waiting for input tiles, 7 = writing classes
  longint cyc_total;
  int n_buf_wait, n_prefetch_stall, n_overlap, n_narrow, n_handover, n_sat, n_wr_bp;
  always @(posedge clk) if (rst_n) begin
    if (busy) cyc_total++;
    if (int'(dut.state) == 3 && !(dut.x_ready && dut.wi_ready)) n_buf_wait++;
    if (dut.x_stall || dut.wi_stall || dut.wh_stall) n_prefetch_stall++;
    if (dut.ch_busy && dut.cx_busy) n_overlap++;
    if (dut.cx_start && dut.jb_cnt == 16'(NJB - 1) && (N_IN % BLOCK) != 0) n_narrow++;
    if (int'(dut.state) == 7 && wr_ready && int'(dut.out_i) == BATCH - 1) n_handover++;
    if (dut.cx_sat) n_sat++;
    if (wr_valid && !wr_ready) n_wr_bp++;
  end

  // ------------------------------------------------------------ reference model
  longint Xr [NS][N_IN];
  longint Wi [4][N_HID][N_IN];
  longint Wh [4][N_HID][N_HID];
  longint Wl [N_OUT][N_HID];
  longint Bi [4][N_HID], Bh [4][N_HID], Bl [N_OUT];
  longint hprev [N_HID], hnext [N_HID], cst [N_HID];
  int     ref_class [NS];
  longint acc  [BATCH][4][BLOCK];
  longint tmph [4][BLOCK];
  longint L    [BATCH][N_OUT];

  function automatic int rnd(input int r);
    return $signed($urandom % (2 * r + 1)) - r;
  endfunction

  task automatic build_data();
    for (int s = 0; s < NS; s++) for (int c = 0; c < N_IN; c++) begin
      Xr[s][c] = ($urandom % 4 == 0) ? 0 : longint'($urandom % 65536);   // [0,1) with some zeros
      u_mem.mem[XB + s * N_IN + c] = 32'(Xr[s][c]);
    end
    for (int g = 0; g < 4; g++) for (int r = 0; r < N_HID; r++) begin
      for (int c = 0; c < N_IN; c++) begin
        Wi[g][r][c] = (g == 0 && r == 0) ? 8000 : longint'(rnd(6000 / N_IN + 40));
        u_mem.mem[WIB + (g * N_HID + r) * N_IN + c] = 32'(Wi[g][r][c]);
      end
      for (int c = 0; c < N_HID; c++) begin
        Wh[g][r][c] = longint'(rnd(3000 / N_HID + 20));
        u_mem.mem[WHB + (g * N_HID + r) * N_HID + c] = 32'(Wh[g][r][c]);
      end
      Bi[g][r] = longint'(rnd(200)); Bh[g][r] = longint'(rnd(200));
      u_mem.mem[BB + g * N_HID + r]         = 32'(Bi[g][r]);
      u_mem.mem[BB + 4 * N_HID + g * N_HID + r] = 32'(Bh[g][r]);
    end
    for (int m = 0; m < N_OUT; m++) begin
      for (int c = 0; c < N_HID; c++) begin
        Wl[m][c] = longint'(rnd(600));
        u_mem.mem[WLB + m * N_HID + c] = 32'(Wl[m][c]);
      end
      Bl[m] = longint'(rnd(300));
      u_mem.mem[BB + 8 * N_HID + m] = 32'(Bl[m]);
    end
    for (int s = 0; s < NS; s++) u_mem.mem[OB + s] = 32'hFFFF_FFFF;
  endtask

  task automatic run_reference();
    logic [3:0][15:0] st;
    st = seed;
    for (int s = 0; s < 4; s++) if (st[s] == 16'h0) st[s] = 16'h1;
    for (int n = 0; n < 2 * N_HID; n++) begin
      longint v;
      v = ref_requant(ref_gauss(st), 13 - HF, HID_W);
      if (n < N_HID) hprev[n] = v; else cst[n - N_HID] = v;
      for (int k = 0; k < 4; k++) st[k] = ref_lfsr_next(st[k]);
    end
    for (int b = 0; b < NB; b++) begin
      for (int kb = 0; kb < NKB; kb++) begin
        for (int g = 0; g < 4; g++) for (int k = 0; k < BLOCK; k++) begin
          int r;
          r = kb * BLOCK + k;
          tmph[g][k] = ref_requant(Bh[g][r], MF - CF, CALC_W);
          for (int j = 0; j < N_HID; j++)
            tmph[g][k] = ref_requant(tmph[g][k] * (longint'(1) << (HF + MF - CF)) + hprev[j] * Wh[g][r][j],
                                     HF + MF - CF, CALC_W);
          for (int i = 0; i < BATCH; i++) begin
            longint a;
            a = ref_requant(Bi[g][r], MF - CF, CALC_W);
            for (int j = 0; j < N_IN; j++)
              a = ref_requant(a * (longint'(1) << (IN_F + MF - CF)) + Xr[b * BATCH + i][j] * Wi[g][r][j],
                              IN_F + MF - CF, CALC_W);
            acc[i][g][k] = a;
          end
        end
        for (int i = 0; i < BATCH; i++) begin
          if (kb == 0) for (int m = 0; m < N_OUT; m++) L[i][m] = ref_requant(Bl[m], MF - CF, CALC_W);
          for (int k = 0; k < BLOCK; k++) begin
            longint p [4];
            int s;
            s = kb * BLOCK + k;
            for (int g = 0; g < 4; g++) p[g] = ref_requant(acc[i][g][k] + tmph[g][k], 0, CALC_W);
            ref_cell(p[0], p[1], p[2], p[3], cst[s], CF, HF, HID_W, cst[s], hnext[s]);
            for (int m = 0; m < N_OUT; m++)
              L[i][m] = ref_requant(L[i][m] * (longint'(1) << (HF + MF - CF)) + hnext[s] * Wl[m][s],
                                    HF + MF - CF, CALC_W);
          end
        end
      end
      for (int i = 0; i < BATCH; i++) begin
        int best;
        best = 0;
        for (int m = 1; m < N_OUT; m++) if (L[i][m] > L[i][best]) best = m;
        ref_class[b * BATCH + i] = best;
      end
      for (int s = 0; s < N_HID; s++) hprev[s] = hnext[s];
    end
  endtask

  // ------------------------------------------------------------ stimulus and checks
  initial begin
    int hist [16];
    longint est;
    seed = {16'hC0DE, 16'h0000, 16'h1357, 16'hF00D};
    cyc_total = 0; n_buf_wait = 0; n_prefetch_stall = 0; n_overlap = 0; n_narrow = 0;
    n_handover = 0; n_sat = 0; n_wr_bp = 0;
    build_data();
    run_reference();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    repeat (3) @(negedge clk);
    for (int m = 0; m < 16; m++) hist[m] = 0;
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (int'(u_mem.mem[OB + s]) != ref_class[s]) begin
        failures++;
        if (failures < 8) $display("sample %0d: class %0d expected %0d", s, u_mem.mem[OB + s], ref_class[s]);
      end
      if (ref_class[s] < 16) hist[ref_class[s]]++;
    end
    for (int s = 0; s < N_HID; s++) begin
      checks++;
      if (longint'(dut.h_prev[s]) != hprev[s] || longint'(dut.c_st[s]) != cst[s]) begin
        failures++;
        if (failures < 8) $display("state %0d: h %0d/%0d c %0d/%0d", s, dut.h_prev[s], hprev[s], dut.c_st[s], cst[s]);
      end
    end
    est = longint'(NB) * (longint'(NKB) * (longint'(BATCH) * N_IN + longint'(BATCH) * BLOCK) + BATCH);
    checks++;
    if (cyc_total < est) begin failures++; $display("finished faster than the compute bound"); end
    $display("cycles %0d (compute bound %0d), %0d samples, classes %p", cyc_total, est, NS, hist);
    $display("buffer waits %0d, loader run-ahead stalls %0d, h/x overlap %0d, narrow tiles %0d, hand-overs %0d, saturations %0d, write back-pressure %0d",
             n_buf_wait, n_prefetch_stall, n_overlap, n_narrow, n_handover, n_sat, n_wr_bp);
    checks++; if (n_buf_wait == 0)       begin failures++; $display("compute never waited for a buffer"); end
    checks++; if (n_prefetch_stall == 0) begin failures++; $display("no loader ever ran a tile ahead"); end
    checks++; if (n_overlap == 0)        begin failures++; $display("hidden and input products never overlapped"); end
    checks++; if ((N_IN % BLOCK) != 0 && n_narrow == 0) begin failures++; $display("no narrow tile"); end
    checks++; if (n_handover != NB)      begin failures++; $display("state hand-overs %0d", n_handover); end
    checks++; if (n_sat == 0)            begin failures++; $display("no saturation"); end
    checks++; if (n_wr_bp == 0)          begin failures++; $display("no write back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
