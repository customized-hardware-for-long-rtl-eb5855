// lstm_logistic_calc: predicted class of one input pair.
//
// Returns the index of the largest of the N_OUT output-layer values of one
// input pair; on a tie the lowest index wins (the same result as a software
// max-element search). The design specifies the function (the index of the
// maximum output); the linear compare chain is this implementation's choice.
//
// Interface: purely combinational. `l_row` holds the N_OUT signed values in
// the Calc format, `class_idx` is an OUT_W-bit unsigned index.
module lstm_logistic_calc #(
  parameter int unsigned N_OUT  = 10,
  parameter int unsigned CALC_W = 14,
  parameter int unsigned OUT_W  = 4
) (
  input  logic signed [CALC_W-1:0] l_row [N_OUT],
  output logic        [OUT_W-1:0]  class_idx
);
  logic signed [CALC_W-1:0] best;

  always_comb begin
    best      = l_row[0];
    class_idx = '0;
    for (int m = 1; m < int'(N_OUT); m++) begin
      if (l_row[m] > best) begin
        best      = l_row[m];
        class_idx = OUT_W'(m);
      end
    end
  end

  initial begin
    assert (N_OUT <= (1 << OUT_W)) else $error("OUT_W too small for N_OUT");
  end
endmodule
