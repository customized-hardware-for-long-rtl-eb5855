// lfsr16: 16-bit maximum-length Fibonacci linear feedback shift register.
//
// The feedback polynomial is x^16 + x^15 + x^13 + x^4 + 1: the feedback bit
// is the XOR of register bits 15, 14, 12 and 3, shifted in at bit 0 while the
// register moves one place toward the MSB. Its period is 2^16 - 1; the
// all-zero state is the only one outside the cycle.
//
// Interface: `load` copies `seed` into the register (a zero seed is replaced
// by 16'h0001 so the register can never lock up; that substitution is this
// implementation's choice). While `en` is high the register advances once per
// clock. `q` is the current state. Reset loads 16'h0001.
module lfsr16 #(
  parameter logic [15:0] TAPS = 16'hD008   // bits 15, 14, 12, 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [15:0] seed,
  input  logic        en,
  output logic [15:0] q
);
  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= 16'h0001;
    else if (load) q <= (seed == 16'h0000) ? 16'h0001 : seed;
    else if (en)   q <= {q[14:0], fb};
  end
endmodule
