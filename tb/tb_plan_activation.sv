// tb_plan_activation: sweeps every input of the <14,6> format through the
// PLAN sigmoid and tanh and compares each output with the segment table
// evaluated in real arithmetic. It also checks the approximation itself:
// the sigmoid stays within 2% (plus one LSB) of 1/(1+e^-x) and the tanh
// within 4% (plus two LSB) of tanh(x), and both are monotonic.
module tb_plan_activation;
  import tb_ref_pkg::*;
  localparam int W = 14, F = 8;
  logic signed [W-1:0] x, ys, yt;
  int checks = 0, failures = 0;

  plan_activation #(.W(W), .F(F), .TANH(1'b0)) dut_s (.x(x), .y(ys));
  plan_activation #(.W(W), .F(F), .TANH(1'b1)) dut_t (.x(x), .y(yt));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, es, et, lsb;
    longint prev_s, prev_t;
    lsb = 1.0 / (2.0 ** F);
    prev_s = -1000000; prev_t = -1000000;
    for (int v = -(1 << (W - 1)); v < (1 << (W - 1)); v++) begin
      x = W'(v);
      #1;
      xr = real'(v) * lsb;
      checks++;
      if (longint'(ys) != ref_plan_sig(v, F) || longint'(yt) != ref_plan_tanh(v, F)) begin
        failures++;
        if (failures < 6) $display("x=%0d sig %0d/%0d tanh %0d/%0d", v, ys, ref_plan_sig(v, F), yt, ref_plan_tanh(v, F));
      end
      es = real'(ys) * lsb - 1.0 / (1.0 + $exp(-xr));
      et = real'(yt) * lsb - (($exp(xr) - $exp(-xr)) / ($exp(xr) + $exp(-xr)));
      checks++;
      if (es > 0.02 + lsb || es < -0.02 - lsb || et > 0.04 + 2 * lsb || et < -0.04 - 2 * lsb) begin
        failures++;
        if (failures < 6) $display("x=%f error sig %f tanh %f", xr, es, et);
      end
      checks++;
      if (longint'(ys) < prev_s || longint'(yt) < prev_t) begin
        failures++;
        if (failures < 6) $display("not monotonic at x=%f", xr);
      end
      prev_s = longint'(ys); prev_t = longint'(yt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
