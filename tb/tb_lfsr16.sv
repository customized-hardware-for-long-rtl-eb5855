// tb_lfsr16: checks the 16-bit Fibonacci LFSR against its polynomial,
// step by step over a whole period, and checks that the period is 65535 and
// that a zero seed is replaced so the register cannot lock up.
module tb_lfsr16;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [15:0] seed, q, expq;
  int checks = 0, failures = 0;

  lfsr16 dut (.clk, .rst_n, .load, .seed, .en, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    seed = 16'hACE1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    checks++; if (q !== 16'hACE1) begin failures++; $display("seed not loaded: %h", q); end
    expq = q;
    en = 1'b1;
    period = 0;
    do begin
      @(negedge clk);
      expq = ref_lfsr_next(expq);
      period++;
      checks++;
      if (q !== expq) begin
        failures++;
        if (failures < 5) $display("step %0d: got %h expected %h", period, q, expq);
      end
    end while (q != 16'hACE1 && period < 70000);
    checks++;
    if (period != 65535) begin failures++; $display("period %0d", period); end
    // zero seed
    en = 1'b0; seed = 16'h0000;
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    checks++; if (q == 16'h0000) begin failures++; $display("zero seed locked the register"); end
    // hold when not enabled
    expq = q;
    repeat (3) @(negedge clk);
    checks++; if (q !== expq) begin failures++; $display("advanced without enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
