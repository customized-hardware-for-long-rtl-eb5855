// tb_lstm_logistic_calc: random and hand-made output rows (including ties,
// all-equal rows and extreme values) against a software arg-max that returns
// the first largest element.
module tb_lstm_logistic_calc;
  localparam int N = 10, CW = 14, OW = 4;
  logic signed [CW-1:0] row [N];
  logic [OW-1:0] idx;
  int checks = 0, failures = 0;

  lstm_logistic_calc #(.N_OUT(N), .CALC_W(CW), .OUT_W(OW)) dut (.l_row(row), .class_idx(idx));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row();
    int best;
    best = 0;
    for (int m = 1; m < N; m++) if (row[m] > row[best]) best = m;
    #1;
    checks++;
    if (int'(idx) != best) begin
      failures++;
      if (failures < 6) $display("got %0d expected %0d", idx, best);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int m = 0; m < N; m++)
        row[m] = (t % 3 == 0) ? CW'($signed($urandom % 8) - 4) : CW'($urandom);
      check_row();
    end
    for (int m = 0; m < N; m++) row[m] = -14'sd8192;
    check_row();
    row[N-1] = 14'sd8191;
    check_row();
    for (int m = 0; m < N; m++) row[m] = 14'sd5;
    row[3] = 14'sd9; row[7] = 14'sd9;
    check_row();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
