// lstm_fizo_logistic_batch: gate activations, state update and output-layer
// accumulation for one hidden block of a batch (LSTM_FIZO_Logistic_Batch).
//
// For every input pair i of the batch and every unit k of the current hidden
// block (state index s = blk_base + k), one per cycle:
//     f = sigma(acc_f[i][k] + tmp_h_f[k])      i = sigma(acc_i[i][k] + tmp_h_i[k])
//     z = tanh (acc_z[i][k] + tmp_h_z[k])      o = sigma(acc_o[i][k] + tmp_h_o[k])
//     c = f*C[s] + i*z ;  h = o*tanh(c)
//     C[s] <- c ; h_next[s] <- h
//     L[i][m] += h * W_l[m][s]   for all m < N_OUT (in parallel)
// The cell state is updated in place and carried from one input pair to the
// next; the gates' hidden-state part (tmp_h) is the batch-wide value computed
// by lstm_calc_batch_h. L holds the fully connected layer's accumulators for
// the whole batch; on the first hidden block (`first`) each row starts from
// the output bias. As in lstm_calc_batch_x, the L row of the pair being
// processed lives in a register for BLOCK cycles, so a pass takes exactly
// BATCH*BLOCK cycles. The activations are PLAN approximations
// (plan_activation). This stage does the whole element in one cycle; it is
// not split into pipeline stages.
//
// Formats: pre-activations and gate values in Calc, cell and hidden state in
// the Hidden format, output accumulators in Calc; every result is truncated
// and saturated into its format.
//
// Interface: `start` pulse (with `first`, blk_base) begins a pass, `busy`
// during it, `done` pulse at the end. acc_rd_row/acc_rd_data reads the
// input-side accumulators, wl_rd_col/wl_rd_data the output weights of unit k,
// all combinationally. The state store is outside: st_addr selects C[s]
// (c_rd, combinational) and st_we writes c_wr into C[s] and h_wr into
// h_next[s]. l_rd_row/l_rd_data reads a finished L row.
module lstm_fizo_logistic_batch
  import lstm_pkg::*;
#(
  parameter int unsigned N_HID  = DEF_N_HID,
  parameter int unsigned N_OUT  = DEF_N_OUT,
  parameter int unsigned BATCH  = DEF_BATCH,
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
  input  logic                      first,
  input  logic [$clog2(N_HID)-1:0]  blk_base,
  output logic                      busy,
  output logic                      done,
  output logic [$clog2(BATCH)-1:0]  acc_rd_row,
  input  logic signed [CALC_W-1:0]  acc_rd_data [NGATES][BLOCK],
  input  logic signed [CALC_W-1:0]  tmp_h [NGATES][BLOCK],
  output logic [$clog2(BLOCK)-1:0]  wl_rd_col,
  input  logic signed [MEM_W-1:0]   wl_rd_data [N_OUT],
  input  logic signed [MEM_W-1:0]   bl [N_OUT],
  output logic [$clog2(N_HID)-1:0]  st_addr,
  input  logic signed [HID_W-1:0]   c_rd,
  output logic                      st_we,
  output logic signed [HID_W-1:0]   c_wr,
  output logic signed [HID_W-1:0]   h_wr,
  input  logic [$clog2(BATCH)-1:0]  l_rd_row,
  output logic signed [CALC_W-1:0]  l_rd_data [N_OUT]
);
  localparam int HID_F  = int'(HID_W) - int'(HID_I);
  localparam int MEM_F  = int'(MEM_W) - int'(MEM_I);
  localparam int CALC_F = int'(CALC_W) - int'(CALC_I);
  // c = f*C + i*z : bring both products to FP fraction bits, then to HID_F
  localparam int FP     = (CALC_F + HID_F > 2 * CALC_F) ? CALC_F + HID_F : 2 * CALC_F;

  logic signed [CALC_W-1:0] L [BATCH][N_OUT];
  logic signed [CALC_W-1:0] lrow_q   [N_OUT];
  logic signed [CALC_W-1:0] lrow_mac [N_OUT];
  logic signed [CALC_W-1:0] bl_c     [N_OUT];

  logic [$clog2(BATCH)-1:0]  i_q;
  logic [$clog2(BLOCK)-1:0]  k_q;
  logic [$clog2(N_HID)-1:0]  base_q;
  logic                      first_q;
  logic                      row_last, pass_last;

  assign acc_rd_row = i_q;
  assign wl_rd_col  = k_q;
  assign st_addr    = base_q + $clog2(N_HID)'(k_q);
  assign row_last   = (k_q == $clog2(BLOCK)'(BLOCK - 1));
  assign pass_last  = row_last && (i_q == $clog2(BATCH)'(BATCH - 1));
  assign st_we      = busy;

  // gate pre-activations
  logic signed [CALC_W-1:0] pre [NGATES];
  logic signed [CALC_W-1:0] f_g, i_g, z_g, o_g;
  always_comb begin
    for (int g = 0; g < int'(NGATES); g++)
      pre[g] = CALC_W'(fx_requant(64'(acc_rd_data[g][k_q]) + 64'(tmp_h[g][k_q]), 0, int'(CALC_W)));
  end

  plan_activation #(.W(CALC_W), .F(CALC_F), .TANH(1'b0)) u_sig_f (.x(pre[GATE_F]), .y(f_g));
  plan_activation #(.W(CALC_W), .F(CALC_F), .TANH(1'b0)) u_sig_i (.x(pre[GATE_I]), .y(i_g));
  plan_activation #(.W(CALC_W), .F(CALC_F), .TANH(1'b1)) u_tanh_z(.x(pre[GATE_Z]), .y(z_g));
  plan_activation #(.W(CALC_W), .F(CALC_F), .TANH(1'b0)) u_sig_o (.x(pre[GATE_O]), .y(o_g));

  // cell and hidden state
  logic signed [HID_W-1:0] tanh_c;
  always_comb begin
    logic signed [63:0] fc, iz;
    fc   = (64'(f_g) * 64'(c_rd)) <<< (FP - (CALC_F + HID_F));
    iz   = (64'(i_g) * 64'(z_g))  <<< (FP - 2 * CALC_F);
    c_wr = HID_W'(fx_requant(fc + iz, FP - HID_F, int'(HID_W)));
  end

  plan_activation #(.W(HID_W), .F(HID_F), .TANH(1'b1)) u_tanh_c (.x(c_wr), .y(tanh_c));

  assign h_wr = HID_W'(fx_requant(64'(o_g) * 64'(tanh_c), CALC_F, int'(HID_W)));

  // output-layer accumulation
  always_comb begin
    for (int m = 0; m < int'(N_OUT); m++) begin
      lrow_mac[m] = CALC_W'(fx_requant(64'(lrow_q[m]) +
                      ((64'(h_wr) * 64'(wl_rd_data[m])) >>> (HID_F + MEM_F - CALC_F)),
                      0, int'(CALC_W)));
      bl_c[m]     = CALC_W'(fx_requant(64'(bl[m]), MEM_F - CALC_F, int'(CALC_W)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; i_q <= '0; k_q <= '0; base_q <= '0; first_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        i_q     <= '0;
        k_q     <= '0;
        base_q  <= blk_base;
        first_q <= first;
      end else if (busy) begin
        k_q <= k_q + 1'b1;
        if (row_last) begin
          k_q <= '0;
          if (pass_last) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      lrow_q <= first ? bl_c : L[0];
    end else if (busy) begin
      if (row_last) begin
        L[i_q] <= lrow_mac;
        if (!pass_last) lrow_q <= first_q ? bl_c : L[i_q + 1'b1];
      end else begin
        lrow_q <= lrow_mac;
      end
    end
  end

  assign l_rd_data = L[l_rd_row];

  initial begin
    assert (N_HID % BLOCK == 0) else $error("N_HID must be a multiple of BLOCK");
  end
endmodule
