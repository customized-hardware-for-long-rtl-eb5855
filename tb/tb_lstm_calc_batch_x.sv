// tb_lstm_calc_batch_x: batch of 5, block of 4, reference formats. Three
// passes are run (a full first tile seeded with the bias, a narrower second
// tile, and a tile with large values that saturates). After each pass every
// accumulator is compared with a sequential reference (bias converted to the
// Calc format, then floor(x*w / 2^shift) added with clamping, column after
// column), and the pass must take exactly BATCH*n_cols cycles.
module tb_lstm_calc_batch_x;
  import tb_ref_pkg::*;
  localparam int BATCH = 5, BLOCK = 4;
  localparam int IN_W = 18, IN_I = 2, MEM_W = 14, MEM_I = 6, CALC_W = 14, CALC_I = 6;
  localparam int PSH = (IN_W - IN_I) + (MEM_W - MEM_I) - (CALC_W - CALC_I);
  localparam int BSH = (MEM_W - MEM_I) - (CALC_W - CALC_I);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, first = 1'b0;
  logic [$clog2(BLOCK+1)-1:0] n_cols;
  logic busy, done, sat_event;
  logic signed [MEM_W-1:0] bias [4][BLOCK];
  logic [$clog2(BATCH)-1:0] x_rd_row, acc_rd_row;
  logic [$clog2(BLOCK)-1:0] x_rd_col, w_rd_col;
  logic signed [IN_W-1:0] x_rd_data;
  logic signed [MEM_W-1:0] w_rd_data [4][BLOCK];
  logic signed [CALC_W-1:0] acc_rd_data [4][BLOCK];

  logic signed [IN_W-1:0]  X [BATCH][BLOCK];
  logic signed [MEM_W-1:0] Wt [BLOCK][4][BLOCK];   // [column j][gate][k]
  longint ref_acc [BATCH][4][BLOCK];
  int checks = 0, failures = 0, sats = 0;

  lstm_calc_batch_x #(.BATCH(BATCH), .BLOCK(BLOCK), .IN_W(IN_W), .IN_I(IN_I), .MEM_W(MEM_W),
                      .MEM_I(MEM_I), .CALC_W(CALC_W), .CALC_I(CALC_I)) dut (
    .clk, .rst_n, .start, .first, .n_cols, .busy, .done, .sat_event, .bias,
    .x_rd_row, .x_rd_col, .x_rd_data, .w_rd_col, .w_rd_data, .acc_rd_row, .acc_rd_data);

  always #5 clk = ~clk;
  assign x_rd_data = X[x_rd_row][x_rd_col];
  assign w_rd_data = Wt[w_rd_col];
  always @(posedge clk) if (sat_event) sats++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(input bit f, input int nc, input int xr, input int wr);
    int cyc;
    for (int i = 0; i < BATCH; i++) for (int j = 0; j < BLOCK; j++)
      X[i][j] = IN_W'($signed($urandom % (2 * xr + 1)) - xr);
    for (int j = 0; j < BLOCK; j++) for (int g = 0; g < 4; g++) for (int k = 0; k < BLOCK; k++)
      Wt[j][g][k] = MEM_W'($signed($urandom % (2 * wr + 1)) - wr);
    for (int g = 0; g < 4; g++) for (int k = 0; k < BLOCK; k++)
      bias[g][k] = MEM_W'($signed($urandom % 2001) - 1000);
    // reference
    for (int i = 0; i < BATCH; i++) for (int g = 0; g < 4; g++) for (int k = 0; k < BLOCK; k++) begin
      if (f) ref_acc[i][g][k] = ref_requant(longint'(bias[g][k]), BSH, CALC_W);
      for (int j = 0; j < nc; j++)
        ref_acc[i][g][k] = ref_requant(ref_acc[i][g][k] * (longint'(1) << PSH) +
                                       longint'(X[i][j]) * longint'(Wt[j][g][k]), PSH, CALC_W);
    end
    @(negedge clk);
    first = f; n_cols = $clog2(BLOCK+1)'(nc); start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != BATCH * nc + 1) begin failures++; $display("pass took %0d cycles, expected %0d", cyc - 1, BATCH * nc); end
    for (int i = 0; i < BATCH; i++) begin
      acc_rd_row = $clog2(BATCH)'(i);
      #1;
      for (int g = 0; g < 4; g++) for (int k = 0; k < BLOCK; k++) begin
        checks++;
        if (longint'(acc_rd_data[g][k]) != ref_acc[i][g][k]) begin
          failures++;
          if (failures < 6) $display("acc[%0d][%0d][%0d]=%0d expected %0d", i, g, k, acc_rd_data[g][k], ref_acc[i][g][k]);
        end
      end
    end
  endtask

  initial begin
    acc_rd_row = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    pass(1'b1, BLOCK, 60000, 3000);
    pass(1'b0, BLOCK - 1, 60000, 3000);
    checks++; if (sats != 0) begin failures++; $display("unexpected saturation"); end
    pass(1'b0, BLOCK, 131071, 8191);
    pass(1'b1, 2, 1000, 100);
    checks++; if (sats == 0) begin failures++; $display("saturation never flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
