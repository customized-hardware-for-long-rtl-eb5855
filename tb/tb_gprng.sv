// tb_gprng: checks the four-LFSR Gaussian generator sample by sample against
// a model built from the LFSR polynomial and the mean of four signed words,
// then checks the distribution of 20000 samples: mean near zero, standard
// deviation near 2^16/sqrt(12)/2, and about 68% of samples n_in1sd one
// standard deviation, as for a near-normal distribution.
module tb_gprng;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [3:0][15:0] seed, st;
  logic signed [15:0] sample;
  logic sample_valid;
  int checks = 0, failures = 0;

  gprng dut (.clk, .rst_n, .load, .seed, .en, .sample, .sample_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum, sum2, mean, sd, sd_exp;
    int n, n_in1sd;
    longint v [20000];
    seed = {16'h1234, 16'hBEEF, 16'h0F0F, 16'h7A5C};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) load = 1'b1;
    @(negedge clk) begin load = 1'b0; en = 1'b1; end
    st = seed;
    sum = 0; sum2 = 0;
    for (n = 0; n < 20000; n++) begin
      @(negedge clk);
      checks++;
      if (!sample_valid || longint'(sample) != ref_gauss(st)) begin
        failures++;
        if (failures < 5) $display("sample %0d: got %0d valid %0b expected %0d", n, sample, sample_valid, ref_gauss(st));
      end
      v[n] = longint'(sample);
      sum += real'(sample); sum2 += real'(sample) * real'(sample);
      for (int k = 0; k < 4; k++) st[k] = ref_lfsr_next(st[k]);
    end
    mean   = sum / 20000.0;
    sd     = $sqrt(sum2 / 20000.0 - mean * mean);
    sd_exp = 65536.0 / $sqrt(12.0) / 2.0;
    n_in1sd = 0;
    for (n = 0; n < 20000; n++) if (real'(v[n]) > mean - sd && real'(v[n]) < mean + sd) n_in1sd++;
    $display("mean %f sd %f (expected %f) within 1 sd %0d/20000", mean, sd, sd_exp, n_in1sd);
    checks++; if (mean > 300.0 || mean < -300.0) begin failures++; $display("mean off"); end
    checks++; if (sd < 0.9 * sd_exp || sd > 1.1 * sd_exp) begin failures++; $display("sd off"); end
    checks++; if (n_in1sd < 12800 || n_in1sd > 14400) begin failures++; $display("shape off"); end
    en = 1'b0;
    @(negedge clk);
    checks++; if (sample_valid) begin failures++; $display("valid without enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
