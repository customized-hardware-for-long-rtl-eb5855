// tb_lstm_calc_batch_h: N_HID=8, block of 4, reference formats. Several
// passes with random hidden states, recurrent weights and biases; after each
// the 4 x BLOCK results are compared with a sequential reference (bias in
// the Calc format, then floor(h*w / 2^shift) added with clamping for every
// hidden column), and each pass must take exactly N_HID cycles.
module tb_lstm_calc_batch_h;
  import tb_ref_pkg::*;
  localparam int N_HID = 8, BLOCK = 4;
  localparam int HID_W = 14, HID_I = 6, MEM_W = 14, MEM_I = 6, CALC_W = 14, CALC_I = 6;
  localparam int PSH = (HID_W - HID_I) + (MEM_W - MEM_I) - (CALC_W - CALC_I);
  localparam int BSH = (MEM_W - MEM_I) - (CALC_W - CALC_I);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic signed [MEM_W-1:0] bias [4][BLOCK];
  logic [$clog2(N_HID)-1:0] h_rd_addr, wh_rd_col;
  logic signed [HID_W-1:0] h_rd_data;
  logic signed [MEM_W-1:0] wh_rd_data [4][BLOCK];
  logic signed [CALC_W-1:0] tmp_h [4][BLOCK];

  logic signed [HID_W-1:0] H [N_HID];
  logic signed [MEM_W-1:0] Wt [N_HID][4][BLOCK];
  int checks = 0, failures = 0;

  lstm_calc_batch_h #(.N_HID(N_HID), .BLOCK(BLOCK), .HID_W(HID_W), .HID_I(HID_I), .MEM_W(MEM_W),
                      .MEM_I(MEM_I), .CALC_W(CALC_W), .CALC_I(CALC_I)) dut (
    .clk, .rst_n, .start, .busy, .done, .bias, .h_rd_addr, .h_rd_data, .wh_rd_col, .wh_rd_data, .tmp_h);

  always #5 clk = ~clk;
  assign h_rd_data  = H[h_rd_addr];
  assign wh_rd_data = Wt[wh_rd_col];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      int cyc, hr, wr;
      longint r;
      hr = (t == 5) ? 8191 : 2000;
      wr = (t == 5) ? 8191 : 1500;
      for (int j = 0; j < N_HID; j++) begin
        H[j] = HID_W'($signed($urandom % (2 * hr + 1)) - hr);
        for (int g = 0; g < 4; g++) for (int k = 0; k < BLOCK; k++)
          Wt[j][g][k] = MEM_W'($signed($urandom % (2 * wr + 1)) - wr);
      end
      for (int g = 0; g < 4; g++) for (int k = 0; k < BLOCK; k++)
        bias[g][k] = MEM_W'($signed($urandom % 2001) - 1000);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != N_HID + 1) begin failures++; $display("pass took %0d cycles", cyc - 1); end
      for (int g = 0; g < 4; g++) for (int k = 0; k < BLOCK; k++) begin
        r = ref_requant(longint'(bias[g][k]), BSH, CALC_W);
        for (int j = 0; j < N_HID; j++)
          r = ref_requant(r * (longint'(1) << PSH) + longint'(H[j]) * longint'(Wt[j][g][k]), PSH, CALC_W);
        checks++;
        if (longint'(tmp_h[g][k]) != r) begin
          failures++;
          if (failures < 6) $display("pass %0d tmp_h[%0d][%0d]=%0d expected %0d", t, g, k, tmp_h[g][k], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
