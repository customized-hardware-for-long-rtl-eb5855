// plan_activation: piecewise-linear (PLAN) sigmoid or hyperbolic tangent.
//
// PLAN approximates the sigmoid with three straight segments on |x| plus a
// constant, using only shifts and additions:
//     |x| >= 5        : 1
//     2.375 <= |x| < 5: |x|/32 + 0.84375
//     1 <= |x| < 2.375: |x|/8  + 0.625
//     0 <= |x| < 1    : |x|/4  + 0.5
// and sigma(-x) = 1 - sigma(x) for negative inputs. The segment constants
// are those of the published PLAN approximation (the design names PLAN and
// its structure: absolute value, shift, bias term, sign-dependent result).
// With TANH = 1 the module computes tanh(x) = 2*sigma(2x) - 1 using the same
// sigmoid core on a doubled input; the internal width is two bits wider than
// the data so neither the doubling nor |x| can overflow.
//
// Interface: purely combinational. `x` and `y` share the signed <W, W-F>
// format (F fraction bits); F must be at least 5 so the constants are exact.
// Shifted magnitudes are truncated toward zero.
module plan_activation #(
  parameter int unsigned W    = 14,
  parameter int unsigned F    = 8,
  parameter bit          TANH = 1'b0
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  localparam int unsigned WI = W + 2;
  localparam logic signed [WI-1:0] ONE     = WI'(1) <<< F;
  localparam logic signed [WI-1:0] TH_5    = WI'(5) <<< F;
  localparam logic signed [WI-1:0] TH_2375 = WI'(19) <<< (F - 3);
  localparam logic signed [WI-1:0] C_84375 = WI'(27) <<< (F - 5);
  localparam logic signed [WI-1:0] C_625   = WI'(5) <<< (F - 3);
  localparam logic signed [WI-1:0] C_5     = WI'(1) <<< (F - 1);

  logic signed [WI-1:0] xi, ax, sp, sg;

  always_comb begin
    xi = TANH ? (WI'(x) <<< 1) : WI'(x);
    ax = (xi < 0) ? -xi : xi;
    if (ax >= TH_5)         sp = ONE;
    else if (ax >= TH_2375) sp = (ax >>> 5) + C_84375;
    else if (ax >= ONE)     sp = (ax >>> 3) + C_625;
    else                    sp = (ax >>> 2) + C_5;
    sg = (xi < 0) ? (ONE - sp) : sp;
    y  = TANH ? W'((sg <<< 1) - ONE) : W'(sg);
  end

  initial begin
    assert (F >= 5 && W - F >= 2)
      else $error("plan_activation needs F >= 5 and at least 2 integer bits");
  end
endmodule
