// tb_lstm_fizo_logistic_batch: batch of 3, block of 4, N_HID=8 (two hidden
// blocks), N_OUT=3, reference formats. The testbench plays the accumulator
// memory, the weight buffer and the state store. Two passes (hidden blocks 0
// and 1) are run twice over; after each pass the cell state, the new hidden
// state and every output accumulator are compared with a reference that
// applies the PLAN gates, the cell update carried from pair to pair, and the
// output-layer accumulation seeded with the bias on the first block. Each
// pass must take exactly BATCH*BLOCK cycles.
module tb_lstm_fizo_logistic_batch;
  import tb_ref_pkg::*;
  localparam int BATCH = 3, BLOCK = 4, N_HID = 8, N_OUT = 3;
  localparam int HID_W = 14, HID_I = 6, MEM_W = 14, MEM_I = 6, CALC_W = 14, CALC_I = 6;
  localparam int HF = HID_W - HID_I, MF = MEM_W - MEM_I, CF = CALC_W - CALC_I;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, first = 1'b0;
  logic [$clog2(N_HID)-1:0] blk_base, st_addr;
  logic busy, done, st_we;
  logic [$clog2(BATCH)-1:0] acc_rd_row, l_rd_row;
  logic signed [CALC_W-1:0] acc_rd_data [4][BLOCK];
  logic signed [CALC_W-1:0] tmp_h [4][BLOCK];
  logic [$clog2(BLOCK)-1:0] wl_rd_col;
  logic signed [MEM_W-1:0] wl_rd_data [N_OUT], bl [N_OUT];
  logic signed [HID_W-1:0] c_rd, c_wr, h_wr;
  logic signed [CALC_W-1:0] l_rd_data [N_OUT];

  logic signed [CALC_W-1:0] ACC [BATCH][4][BLOCK];
  logic signed [MEM_W-1:0]  WL [BLOCK][N_OUT];
  logic signed [HID_W-1:0]  C [N_HID], HN [N_HID];
  longint rC [N_HID], rH [N_HID], rL [BATCH][N_OUT];
  int checks = 0, failures = 0;

  lstm_fizo_logistic_batch #(.N_HID(N_HID), .N_OUT(N_OUT), .BATCH(BATCH), .BLOCK(BLOCK),
    .HID_W(HID_W), .HID_I(HID_I), .MEM_W(MEM_W), .MEM_I(MEM_I), .CALC_W(CALC_W), .CALC_I(CALC_I)) dut (
    .clk, .rst_n, .start, .first, .blk_base, .busy, .done, .acc_rd_row, .acc_rd_data, .tmp_h,
    .wl_rd_col, .wl_rd_data, .bl, .st_addr, .c_rd, .st_we, .c_wr, .h_wr, .l_rd_row, .l_rd_data);

  always #5 clk = ~clk;
  assign acc_rd_data = ACC[acc_rd_row];
  assign wl_rd_data  = WL[wl_rd_col];
  assign c_rd        = C[st_addr];
  always @(posedge clk) if (st_we && rst_n) begin C[st_addr] <= c_wr; HN[st_addr] <= h_wr; end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int r);
    return $signed($urandom % (2 * r + 1)) - r;
  endfunction

  task automatic pass(input int kb);
    int cyc;
    for (int i = 0; i < BATCH; i++) for (int g = 0; g < 4; g++) for (int k = 0; k < BLOCK; k++)
      ACC[i][g][k] = CALC_W'(rnd(1500));
    for (int g = 0; g < 4; g++) for (int k = 0; k < BLOCK; k++) tmp_h[g][k] = CALC_W'(rnd(700));
    for (int k = 0; k < BLOCK; k++) for (int m = 0; m < N_OUT; m++) WL[k][m] = MEM_W'(rnd(2000));
    for (int m = 0; m < N_OUT; m++) bl[m] = MEM_W'(rnd(800));
    // reference
    for (int i = 0; i < BATCH; i++) begin
      if (kb == 0) for (int m = 0; m < N_OUT; m++) rL[i][m] = ref_requant(longint'(bl[m]), MF - CF, CALC_W);
      for (int k = 0; k < BLOCK; k++) begin
        longint p [4];
        int s;
        s = kb * BLOCK + k;
        for (int g = 0; g < 4; g++) p[g] = ref_requant(longint'(ACC[i][g][k]) + longint'(tmp_h[g][k]), 0, CALC_W);
        ref_cell(p[0], p[1], p[2], p[3], rC[s], CF, HF, HID_W, rC[s], rH[s]);
        for (int m = 0; m < N_OUT; m++)
          rL[i][m] = ref_requant(rL[i][m] * (longint'(1) << (HF + MF - CF)) + rH[s] * longint'(WL[k][m]),
                                 HF + MF - CF, CALC_W);
      end
    end
    @(negedge clk);
    first = (kb == 0); blk_base = $clog2(N_HID)'(kb * BLOCK); start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != BATCH * BLOCK + 1) begin failures++; $display("pass took %0d cycles", cyc - 1); end
    for (int k = 0; k < BLOCK; k++) begin
      int s;
      s = kb * BLOCK + k;
      checks++;
      if (longint'(C[s]) != rC[s] || longint'(HN[s]) != rH[s]) begin
        failures++;
        if (failures < 6) $display("state %0d: c %0d/%0d h %0d/%0d", s, C[s], rC[s], HN[s], rH[s]);
      end
    end
    for (int i = 0; i < BATCH; i++) begin
      l_rd_row = $clog2(BATCH)'(i);
      #1;
      for (int m = 0; m < N_OUT; m++) begin
        checks++;
        if (longint'(l_rd_data[m]) != rL[i][m]) begin
          failures++;
          if (failures < 6) $display("L[%0d][%0d]=%0d expected %0d", i, m, l_rd_data[m], rL[i][m]);
        end
      end
    end
  endtask

  initial begin
    l_rd_row = '0;
    for (int s = 0; s < N_HID; s++) begin
      C[s] = HID_W'(rnd(600)); HN[s] = '0; rC[s] = longint'(C[s]); rH[s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      pass(0);
      pass(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
