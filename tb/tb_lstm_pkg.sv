// tb_lstm_pkg: checks the fixed-point helpers of lstm_pkg.
//
// fx_requant (floor shift, then saturate to a signed width) and fx_overflows
// are compared with a real-arithmetic restatement from tb_ref_pkg over random
// values, shifts in both directions and target widths, plus the corner cases
// at the edges of the range. The gate order of the shared enum is checked as
// well, since every 4-wide array in the design relies on it.
module tb_lstm_pkg;
  import lstm_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input longint v, input int sh, input int w);
    longint got, exp;
    logic   ov, ov_exp;
    got    = longint'(fx_requant(v, sh, w));
    exp    = ref_requant(v, sh, w);
    ov     = fx_overflows(v, sh, w);
    ov_exp = (ref_requant(v, sh, 62) != exp);
    checks++;
    if (got != exp || ov != ov_exp) begin
      failures++;
      if (failures < 10) $display("v=%0d shift=%0d w=%0d: got %0d/%0b expected %0d/%0b", v, sh, w, got, ov, exp, ov_exp);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int n = 0; n < 20000; n++) begin
      longint v;
      int sh, w;
      v  = longint'($signed({$urandom, $urandom})) >>> ($urandom % 40);
      sh = int'($urandom % 24) - 3;
      w  = 4 + int'($urandom % 17);
      check_one(v, sh, w);
      if (n % 64 == 0) @(posedge clk);
    end
    for (int w = 4; w <= 20; w++) begin
      longint mx;
      mx = (longint'(1) << (w - 1)) - 1;
      check_one(mx, 0, w); check_one(mx + 1, 0, w); check_one(-mx - 1, 0, w); check_one(-mx - 2, 0, w);
      check_one(-1, 4, w); check_one(-17, 4, w); check_one(17, 4, w);
    end
    checks++;
    if (int'(GATE_F) != 0 || int'(GATE_I) != 1 || int'(GATE_Z) != 2 || int'(GATE_O) != 3 || NGATES != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
