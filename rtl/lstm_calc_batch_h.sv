// lstm_calc_batch_h: hidden-state part of the four gate pre-activations for
// one hidden block (LSTM_Calc_Batch_h).
//
// Because the state is kept per batch, this part is the same for every input
// pair of a batch and is computed once per hidden block:
//     tmp_h[g][k] = b_hg[k] + sum_{j < N_HID} h[j] * W_hg[kb*BLOCK+k][j]
// One hidden value per cycle is multiplied by the BLOCK weights of the four
// gates for that column, so a pass takes N_HID cycles. It runs alongside
// lstm_calc_batch_x, which is what lets the hidden-state and input-pair work
// of a block overlap. The design leaves this loop unpipelined as it is not a
// bottleneck; here it is one multiply-accumulate row per cycle.
//
// Arithmetic as in lstm_calc_batch_x: exact products truncated to the Calc
// format and accumulated with saturation; the accumulators start at the
// hidden-side bias.
//
// Interface: `start` pulse begins a pass, `busy` during it, `done` pulse at
// the end; tmp_h is valid from `done` until the next `start`. The hidden
// state and the weight column are read combinationally via h_rd_addr and
// wh_rd_col (both equal to the column index j).
module lstm_calc_batch_h
  import lstm_pkg::*;
#(
  parameter int unsigned N_HID  = DEF_N_HID,
  parameter int unsigned BLOCK  = DEF_BLOCK,
  parameter int unsigned HID_W  = DEF_HID_W,
  parameter int unsigned HID_I  = DEF_HID_I,
  parameter int unsigned MEM_W  = DEF_MEM_W,
  parameter int unsigned MEM_I  = DEF_MEM_I,
  parameter int unsigned CALC_W = DEF_CALC_W,
  parameter int unsigned CALC_I = DEF_CALC_I
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  output logic                      busy,
  output logic                      done,
  input  logic signed [MEM_W-1:0]   bias [NGATES][BLOCK],
  output logic [$clog2(N_HID)-1:0]  h_rd_addr,
  input  logic signed [HID_W-1:0]   h_rd_data,
  output logic [$clog2(N_HID)-1:0]  wh_rd_col,
  input  logic signed [MEM_W-1:0]   wh_rd_data [NGATES][BLOCK],
  output logic signed [CALC_W-1:0]  tmp_h [NGATES][BLOCK]
);
  localparam int HID_F  = int'(HID_W) - int'(HID_I);
  localparam int MEM_F  = int'(MEM_W) - int'(MEM_I);
  localparam int CALC_F = int'(CALC_W) - int'(CALC_I);
  localparam int PSH    = HID_F + MEM_F - CALC_F;
  localparam int BSH    = MEM_F - CALC_F;

  logic [$clog2(N_HID)-1:0] j_q;
  logic signed [CALC_W-1:0] mac [NGATES][BLOCK];

  assign h_rd_addr = j_q;
  assign wh_rd_col = j_q;

  always_comb begin
    for (int g = 0; g < int'(NGATES); g++) begin
      for (int k = 0; k < int'(BLOCK); k++) begin
        logic signed [63:0] prod;
        prod = 64'(h_rd_data) * 64'(wh_rd_data[g][k]);
        mac[g][k] = CALC_W'(fx_requant(64'(tmp_h[g][k]) + (prod >>> PSH), 0, int'(CALC_W)));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; j_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        j_q  <= '0;
      end else if (busy) begin
        if (j_q == $clog2(N_HID)'(N_HID - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        j_q <= j_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      for (int g = 0; g < int'(NGATES); g++)
        for (int k = 0; k < int'(BLOCK); k++)
          tmp_h[g][k] <= CALC_W'(fx_requant(64'(bias[g][k]), BSH, int'(CALC_W)));
    end else if (busy) begin
      tmp_h <= mac;
    end
  end
endmodule
