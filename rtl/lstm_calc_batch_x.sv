// lstm_calc_batch_x: input-pair part of the four gate pre-activations for a
// whole batch (LSTM_Calc_Batch_X).
//
// For the current hidden block it keeps, for every input pair i of the batch
// and every gate g, BLOCK accumulators acc[i][g][k] holding
//     b_ig[k] + sum_j x[i][j] * W_ig[k][j]
// over the input columns seen so far. One pass consumes one column tile: for
// each input pair i, for each of the n_cols columns j of the tile, one input
// value x[i][j] is multiplied by the BLOCK weights of all four gates for
// column j and added into 4*BLOCK accumulators in one cycle. The row of
// accumulators of the pair being processed is held in a register for the
// n_cols cycles of its row and written back on the last one, while the next
// row is loaded in the same cycle, so a pass takes exactly BATCH*n_cols
// cycles. On the first column tile of a hidden block (`first`) the row is
// seeded with the input-side bias instead of its old contents, which is how
// the accumulators are initialised with the biases.
//
// Arithmetic: each product is exact, truncated to the Calc format's fraction
// bits and added with saturation, the same result as a saturating fixed-point
// accumulator of the Calc format. Biases arrive in the Mem format.
//
// Interface: a `start` pulse (with `first` and n_cols) begins a pass;
// `busy` is high during it and `done` pulses after the last write. The input
// value and weight column are read combinationally through x_rd_row/x_rd_col
// and w_rd_col. acc_rd_row/acc_rd_data is a combinational read port onto the
// accumulator memory for the activation stage. `sat_event` pulses when an
// accumulation saturates.
module lstm_calc_batch_x
  import lstm_pkg::*;
#(
  parameter int unsigned BATCH  = DEF_BATCH,
  parameter int unsigned BLOCK  = DEF_BLOCK,
  parameter int unsigned IN_W   = DEF_IN_W,
  parameter int unsigned IN_I   = DEF_IN_I,
  parameter int unsigned MEM_W  = DEF_MEM_W,
  parameter int unsigned MEM_I  = DEF_MEM_I,
  parameter int unsigned CALC_W = DEF_CALC_W,
  parameter int unsigned CALC_I = DEF_CALC_I
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       first,
  input  logic [$clog2(BLOCK+1)-1:0] n_cols,
  output logic                       busy,
  output logic                       done,
  output logic                       sat_event,
  input  logic signed [MEM_W-1:0]    bias [NGATES][BLOCK],
  output logic [$clog2(BATCH)-1:0]   x_rd_row,
  output logic [$clog2(BLOCK)-1:0]   x_rd_col,
  input  logic signed [IN_W-1:0]     x_rd_data,
  output logic [$clog2(BLOCK)-1:0]   w_rd_col,
  input  logic signed [MEM_W-1:0]    w_rd_data [NGATES][BLOCK],
  input  logic [$clog2(BATCH)-1:0]   acc_rd_row,
  output logic signed [CALC_W-1:0]   acc_rd_data [NGATES][BLOCK]
);
  localparam int IN_F   = int'(IN_W) - int'(IN_I);
  localparam int MEM_F  = int'(MEM_W) - int'(MEM_I);
  localparam int CALC_F = int'(CALC_W) - int'(CALC_I);
  localparam int PSH    = IN_F + MEM_F - CALC_F;   // product -> Calc
  localparam int BSH    = MEM_F - CALC_F;          // bias -> Calc
  localparam int CW     = $clog2(BLOCK + 1);

  logic signed [CALC_W-1:0] acc [BATCH][NGATES][BLOCK];
  logic signed [CALC_W-1:0] row_q   [NGATES][BLOCK];
  logic signed [CALC_W-1:0] row_mac [NGATES][BLOCK];
  logic signed [CALC_W-1:0] row_src [NGATES][BLOCK];
  logic signed [CALC_W-1:0] bias_c  [NGATES][BLOCK];

  logic [$clog2(BATCH)-1:0]   i_q;
  logic [$clog2(BLOCK+1)-1:0] j_q;
  logic [$clog2(BLOCK+1)-1:0] ncols_q;
  logic                       first_q;
  logic                       row_last, pass_last;
  logic                       sat_any;

  assign x_rd_row  = i_q;
  assign x_rd_col  = j_q[$clog2(BLOCK)-1:0];
  assign w_rd_col  = j_q[$clog2(BLOCK)-1:0];
  assign row_last  = (j_q == ncols_q - 1'b1);
  assign pass_last = row_last && (i_q == $clog2(BATCH)'(BATCH - 1));

  // multiply-accumulate for 4*BLOCK lanes
  always_comb begin
    sat_any = 1'b0;
    for (int g = 0; g < int'(NGATES); g++) begin
      for (int k = 0; k < int'(BLOCK); k++) begin
        logic signed [63:0] prod, sum;
        prod = 64'(x_rd_data) * 64'(w_rd_data[g][k]);
        sum  = 64'(row_q[g][k]) + (prod >>> PSH);
        row_mac[g][k] = CALC_W'(fx_requant(sum, 0, int'(CALC_W)));
        sat_any |= fx_overflows(sum, 0, int'(CALC_W));
        bias_c[g][k]  = CALC_W'(fx_requant(64'(bias[g][k]), BSH, int'(CALC_W)));
      end
    end
  end

  // source of the next row: bias on the first tile, stored partial sums after
  always_comb begin
    for (int g = 0; g < int'(NGATES); g++)
      for (int k = 0; k < int'(BLOCK); k++)
        row_src[g][k] = first_q ? bias_c[g][k]
                                : acc[(start && !busy) ? '0 : i_q + 1'b1][g][k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; sat_event <= 1'b0;
      i_q <= '0; j_q <= '0; ncols_q <= '0; first_q <= 1'b0;
    end else begin
      done      <= 1'b0;
      sat_event <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        i_q     <= '0;
        j_q     <= '0;
        ncols_q <= n_cols;
        first_q <= first;
      end else if (busy) begin
        sat_event <= sat_any;
        if (row_last) begin
          j_q <= '0;
          if (pass_last) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end else begin
          j_q <= j_q + 1'b1;
        end
      end
    end
  end

  // row register and accumulator memory
  always_ff @(posedge clk) begin
    if (start && !busy) begin
      for (int g = 0; g < int'(NGATES); g++)
        for (int k = 0; k < int'(BLOCK); k++)
          row_q[g][k] <= first ? bias_c[g][k] : acc[0][g][k];
    end else if (busy) begin
      if (row_last) begin
        acc[i_q] <= row_mac;
        if (!pass_last) row_q <= row_src;
      end else begin
        row_q <= row_mac;
      end
    end
  end

  assign acc_rd_data = acc[acc_rd_row];

  assert property (@(posedge clk) disable iff (!rst_n) start |-> (n_cols != 0 && n_cols <= CW'(BLOCK)))
    else $error("lstm_calc_batch_x: bad column count");
endmodule
