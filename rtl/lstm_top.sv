// lstm_top: block-batched LSTM inference accelerator with off-chip storage.
//
// The accelerator runs one LSTM cell followed by a fully connected output
// layer and an arg-max over its outputs, for nSamples input pairs held in
// off-chip memory. Input pairs are processed BATCH at a time. For each batch
// and each block kb of BLOCK hidden units:
//   1. lstm_calc_batch_h multiplies the batch-start hidden state by the W_h
//      rows of the block (once for the whole batch) while
//   2. lstm_calc_batch_x streams the batch's input pairs against the W_i rows
//      of the block, one BLOCK-wide column tile at a time, accumulating the
//      input-pair part of all four gates for every pair of the batch;
//   3. lstm_fizo_logistic_batch then produces the gates, updates the cell
//      state of the block's units pair after pair, and adds the new hidden
//      values into the output-layer accumulators of each pair.
// After the last block the arg-max (lstm_logistic_calc) of every pair's
// outputs is written to memory and the hidden state produced by the last
// pair of the batch becomes the state the next batch starts from (a
// "batch-stateful" network: one state vector per batch, not per pair).
//
// Three buffering blocks fetch the next tile into the idle half of their
// ping-pong buffers while the compute blocks work on the other half, each
// through its own memory read port: port 0 input pairs (buffer_x_batch),
// port 1 input weights (buffer_wi_blocks), port 2 recurrent weights, biases
// and output weights (buffer_wh_blocks). The hidden and cell state start from
// Gaussian pseudo-random values (gprng), seeded by `seed`.
//
// Memory map (word addresses, one value per DATA_W-bit word as a signed
// integer value*2^F): X[nSamples][N_IN] at x_base; W_i gates f,i,z,o, each
// [N_HID][N_IN], at wi_base; W_h gates f,i,z,o, each [N_HID][N_HID], at
// wh_base; W_l[N_OUT][N_HID] at wl_base; b_i[4][N_HID], b_h[4][N_HID],
// b_l[N_OUT] one after the other at bias_base; one class index per input
// pair written from out_base.
//
// Interface: a `start` pulse with the base addresses, the number of batches
// n_batches (nSamples = n_batches*BATCH) and the seeds begins a run; `busy`
// stays high until `done` pulses. Read ports: req_valid/req_ready with
// req_addr and req_len (a burst of words), then rsp_valid/rsp_data words in
// request order, never back-pressured. Write port: wr_valid/wr_ready with
// wr_addr/wr_data, one word per transfer.
//
// Timing: one input column tile of a batch costs BATCH*cols cycles of
// lstm_calc_batch_x, the activation stage BATCH*BLOCK cycles per hidden
// block, and the state initialisation 2*N_HID+1 cycles per run. A batch
// therefore takes about BATCH*(N_IN*N_HID/BLOCK + N_HID) cycles plus BATCH
// write cycles when memory keeps up.
//
// Lint notes: the loader stall flags, the unit busy flags and the saturation
// flag are collected here but drive nothing; they are kept as observation
// points for performance counters and testbenches. rst_n is the asynchronous
// reset of every register and also the disable condition of the assertions,
// which a linter may report as mixed synchronous and asynchronous use; the
// circuit itself uses it only asynchronously.
//
// Sizes and formats default to the reference configuration (784-128-10
// network, batch 500, block 64, <18,2> inputs, <14,6> elsewhere, 4-bit
// output). The handshakes, memory map, state seeding scale and one-value-
// per-word layout are this implementation's choices.
module lstm_top
  import lstm_pkg::*;
#(
  parameter int unsigned N_IN   = DEF_N_IN,
  parameter int unsigned N_HID  = DEF_N_HID,
  parameter int unsigned N_OUT  = DEF_N_OUT,
  parameter int unsigned BATCH  = DEF_BATCH,
  parameter int unsigned BLOCK  = DEF_BLOCK,
  parameter int unsigned IN_W   = DEF_IN_W,
  parameter int unsigned IN_I   = DEF_IN_I,
  parameter int unsigned HID_W  = DEF_HID_W,
  parameter int unsigned HID_I  = DEF_HID_I,
  parameter int unsigned MEM_W  = DEF_MEM_W,
  parameter int unsigned MEM_I  = DEF_MEM_I,
  parameter int unsigned CALC_W = DEF_CALC_W,
  parameter int unsigned CALC_I = DEF_CALC_I,
  parameter int unsigned OUT_W  = DEF_OUT_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // control (host side)
  input  logic                   start,
  input  logic [15:0]            n_batches,
  input  logic [ADDR_W-1:0]      x_base,
  input  logic [ADDR_W-1:0]      wi_base,
  input  logic [ADDR_W-1:0]      wh_base,
  input  logic [ADDR_W-1:0]      wl_base,
  input  logic [ADDR_W-1:0]      bias_base,
  input  logic [ADDR_W-1:0]      out_base,
  input  logic [3:0][15:0]       seed,
  output logic                   busy,
  output logic                   done,
  // three memory read ports: 0 = input pairs, 1 = W_i, 2 = W_h/biases/W_l
  output logic [2:0]             rd_req_valid,
  input  logic [2:0]             rd_req_ready,
  output logic [2:0][ADDR_W-1:0] rd_req_addr,
  output logic [2:0][LEN_W-1:0]  rd_req_len,
  input  logic [2:0]             rd_rsp_valid,
  input  logic [2:0][DATA_W-1:0] rd_rsp_data,
  // memory write port for the predicted classes
  output logic                   wr_valid,
  input  logic                   wr_ready,
  output logic [ADDR_W-1:0]      wr_addr,
  output logic [DATA_W-1:0]      wr_data
);
  localparam int unsigned NJB    = (N_IN + BLOCK - 1) / BLOCK;
  localparam int unsigned NKB    = N_HID / BLOCK;
  localparam int unsigned LAST_W = N_IN - (NJB - 1) * BLOCK;
  localparam int          HID_F  = int'(HID_W) - int'(HID_I);
  localparam int          CW     = $clog2(BLOCK + 1);
  localparam int          AB     = $clog2(BATCH);
  localparam int          AH     = $clog2(N_HID);
  localparam int          AK     = $clog2(BLOCK);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_KB_WAIT, S_X_WAIT, S_X_RUN, S_H_WAIT, S_FIZO, S_OUT, S_DONE
  } state_e;
  state_e state;

  // ---------------------------------------------------------------- state store
  logic signed [HID_W-1:0] h_prev [N_HID];   // state the current batch started from
  logic signed [HID_W-1:0] h_next [N_HID];   // state left by the latest input pair
  logic signed [HID_W-1:0] c_st   [N_HID];   // cell state

  // ---------------------------------------------------------------- run registers
  logic [15:0]       nb_q, b_cnt, kb_cnt, jb_cnt;
  logic [ADDR_W-1:0] out_addr;
  logic [AB-1:0]     out_i;
  logic [AH+1:0]     gen_cnt, init_cnt;
  logic              h_done_flag;

  // ---------------------------------------------------------------- sub-block wiring
  logic x_ready, wi_ready, wh_ready;
  logic x_release, wi_release, wh_release;
  logic x_busy, wi_busy, wh_busy, x_stall, wi_stall, wh_stall;

  logic [AB-1:0]            x_rd_row;
  logic [AK-1:0]            x_rd_col, w_rd_col, wl_rd_col;
  logic signed [IN_W-1:0]   x_rd_data;
  logic signed [MEM_W-1:0]  wi_col [NGATES][BLOCK];
  logic [AH-1:0]            wh_rd_col, h_rd_addr;
  logic signed [MEM_W-1:0]  wh_col [NGATES][BLOCK];
  logic signed [MEM_W-1:0]  bi [NGATES][BLOCK];
  logic signed [MEM_W-1:0]  bh [NGATES][BLOCK];
  logic signed [MEM_W-1:0]  wl_col [N_OUT];
  logic signed [MEM_W-1:0]  bl [N_OUT];

  logic              cx_start, cx_busy, cx_done, cx_sat;
  logic              ch_start, ch_busy, ch_done;
  logic              fz_start, fz_busy, fz_done;
  logic [AB-1:0]     acc_rd_row;
  logic signed [CALC_W-1:0] acc_row [NGATES][BLOCK];
  logic signed [CALC_W-1:0] tmp_h   [NGATES][BLOCK];
  logic [AH-1:0]     st_addr;
  logic              st_we;
  logic signed [HID_W-1:0] c_wr, h_wr;
  logic signed [CALC_W-1:0] l_row [N_OUT];
  logic [OUT_W-1:0]  class_idx;

  logic              g_load, g_en, g_valid;
  logic signed [15:0] g_sample;

  // ---------------------------------------------------------------- buffering blocks
  buffer_x_batch #(.N_IN(N_IN), .N_HID(N_HID), .BATCH(BATCH), .BLOCK(BLOCK), .IN_W(IN_W)) u_buf_x (
    .clk, .rst_n, .start(start && state == S_IDLE), .x_base, .n_batches,
    .busy(x_busy), .stall(x_stall),
    .req_valid(rd_req_valid[0]), .req_ready(rd_req_ready[0]),
    .req_addr(rd_req_addr[0]), .req_len(rd_req_len[0]),
    .rsp_valid(rd_rsp_valid[0]), .rsp_data(rd_rsp_data[0]),
    .cons_ready(x_ready), .cons_release(x_release),
    .rd_row(x_rd_row), .rd_col(x_rd_col), .rd_data(x_rd_data)
  );

  buffer_wi_blocks #(.N_IN(N_IN), .N_HID(N_HID), .BLOCK(BLOCK), .MEM_W(MEM_W)) u_buf_wi (
    .clk, .rst_n, .start(start && state == S_IDLE), .wi_base, .n_batches,
    .busy(wi_busy), .stall(wi_stall),
    .req_valid(rd_req_valid[1]), .req_ready(rd_req_ready[1]),
    .req_addr(rd_req_addr[1]), .req_len(rd_req_len[1]),
    .rsp_valid(rd_rsp_valid[1]), .rsp_data(rd_rsp_data[1]),
    .cons_ready(wi_ready), .cons_release(wi_release),
    .rd_col(w_rd_col), .rd_data(wi_col)
  );

  buffer_wh_blocks #(.N_HID(N_HID), .N_OUT(N_OUT), .BLOCK(BLOCK), .MEM_W(MEM_W)) u_buf_wh (
    .clk, .rst_n, .start(start && state == S_IDLE), .wh_base, .wl_base, .bias_base, .n_batches,
    .busy(wh_busy), .stall(wh_stall),
    .req_valid(rd_req_valid[2]), .req_ready(rd_req_ready[2]),
    .req_addr(rd_req_addr[2]), .req_len(rd_req_len[2]),
    .rsp_valid(rd_rsp_valid[2]), .rsp_data(rd_rsp_data[2]),
    .cons_ready(wh_ready), .cons_release(wh_release),
    .wh_rd_col(wh_rd_col), .wh_rd_data(wh_col), .bi(bi), .bh(bh),
    .wl_rd_col(wl_rd_col), .wl_rd_data(wl_col), .bl(bl)
  );

  // ---------------------------------------------------------------- computation blocks
  lstm_calc_batch_x #(.BATCH(BATCH), .BLOCK(BLOCK), .IN_W(IN_W), .IN_I(IN_I),
                      .MEM_W(MEM_W), .MEM_I(MEM_I), .CALC_W(CALC_W), .CALC_I(CALC_I)) u_calc_x (
    .clk, .rst_n, .start(cx_start), .first(jb_cnt == 16'd0),
    .n_cols((jb_cnt == 16'(NJB - 1)) ? CW'(LAST_W) : CW'(BLOCK)),
    .busy(cx_busy), .done(cx_done), .sat_event(cx_sat),
    .bias(bi), .x_rd_row, .x_rd_col, .x_rd_data,
    .w_rd_col, .w_rd_data(wi_col),
    .acc_rd_row, .acc_rd_data(acc_row)
  );

  lstm_calc_batch_h #(.N_HID(N_HID), .BLOCK(BLOCK), .HID_W(HID_W), .HID_I(HID_I),
                      .MEM_W(MEM_W), .MEM_I(MEM_I), .CALC_W(CALC_W), .CALC_I(CALC_I)) u_calc_h (
    .clk, .rst_n, .start(ch_start), .busy(ch_busy), .done(ch_done),
    .bias(bh), .h_rd_addr, .h_rd_data(h_prev[h_rd_addr]),
    .wh_rd_col, .wh_rd_data(wh_col), .tmp_h
  );

  lstm_fizo_logistic_batch #(.N_HID(N_HID), .N_OUT(N_OUT), .BATCH(BATCH), .BLOCK(BLOCK),
                             .HID_W(HID_W), .HID_I(HID_I), .MEM_W(MEM_W), .MEM_I(MEM_I),
                             .CALC_W(CALC_W), .CALC_I(CALC_I)) u_fizo (
    .clk, .rst_n, .start(fz_start), .first(kb_cnt == 16'd0),
    .blk_base(AH'(kb_cnt) * AH'(BLOCK)),
    .busy(fz_busy), .done(fz_done),
    .acc_rd_row, .acc_rd_data(acc_row), .tmp_h,
    .wl_rd_col, .wl_rd_data(wl_col), .bl,
    .st_addr, .c_rd(c_st[st_addr]), .st_we, .c_wr, .h_wr,
    .l_rd_row(out_i), .l_rd_data(l_row)
  );

  lstm_logistic_calc #(.N_OUT(N_OUT), .CALC_W(CALC_W), .OUT_W(OUT_W)) u_argmax (
    .l_row(l_row), .class_idx(class_idx)
  );

  gprng u_gprng (
    .clk, .rst_n, .load(g_load), .seed, .en(g_en),
    .sample(g_sample), .sample_valid(g_valid)
  );

  // ---------------------------------------------------------------- control
  assign g_load     = (state == S_IDLE) && start;
  assign g_en       = (state == S_INIT) && (gen_cnt < (AH+2)'(2 * N_HID));
  assign ch_start   = (state == S_KB_WAIT) && wh_ready;
  assign cx_start   = (state == S_X_WAIT) && x_ready && wi_ready;
  assign x_release  = (state == S_X_RUN) && cx_done;
  assign wi_release = x_release;
  assign fz_start   = (state == S_H_WAIT) && (h_done_flag || ch_done);
  assign wh_release = (state == S_FIZO) && fz_done;

  assign busy     = (state != S_IDLE);
  assign wr_valid = (state == S_OUT);
  assign wr_addr  = out_addr;
  assign wr_data  = DATA_W'(class_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      nb_q <= '0; b_cnt <= '0; kb_cnt <= '0; jb_cnt <= '0;
      out_addr <= '0; out_i <= '0; gen_cnt <= '0; init_cnt <= '0;
      h_done_flag <= 1'b0;
    end else begin
      done <= 1'b0;
      if (ch_start)     h_done_flag <= 1'b0;
      else if (ch_done) h_done_flag <= 1'b1;
      if (g_en) gen_cnt <= gen_cnt + 1'b1;
      case (state)
        S_IDLE: if (start) begin
          nb_q <= n_batches; b_cnt <= '0; kb_cnt <= '0; jb_cnt <= '0;
          out_addr <= out_base; out_i <= '0;
          gen_cnt <= '0; init_cnt <= '0;
          state <= (n_batches == 16'd0) ? S_DONE : S_INIT;
        end
        S_INIT: begin
          if (g_valid) init_cnt <= init_cnt + 1'b1;
          if (g_valid && init_cnt == (AH+2)'(2 * N_HID - 1)) state <= S_KB_WAIT;
        end
        S_KB_WAIT: if (wh_ready) begin
          jb_cnt <= '0;
          state  <= S_X_WAIT;
        end
        S_X_WAIT: if (x_ready && wi_ready) state <= S_X_RUN;
        S_X_RUN: if (cx_done) begin
          if (jb_cnt == 16'(NJB - 1)) state <= S_H_WAIT;
          else begin
            jb_cnt <= jb_cnt + 1'b1;
            state  <= S_X_WAIT;
          end
        end
        S_H_WAIT: if (h_done_flag || ch_done) state <= S_FIZO;
        S_FIZO: if (fz_done) begin
          if (kb_cnt == 16'(NKB - 1)) begin
            kb_cnt <= '0;
            out_i  <= '0;
            state  <= S_OUT;
          end else begin
            kb_cnt <= kb_cnt + 1'b1;
            state  <= S_KB_WAIT;
          end
        end
        S_OUT: if (wr_ready) begin
          out_addr <= out_addr + 1'b1;
          if (out_i == AB'(BATCH - 1)) begin
            b_cnt <= b_cnt + 1'b1;
            state <= (b_cnt == nb_q - 1'b1) ? S_DONE : S_KB_WAIT;
          end else begin
            out_i <= out_i + 1'b1;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // state store: seeding, per-element update, batch hand-over
  always_ff @(posedge clk) begin
    if (state == S_INIT && g_valid) begin
      if (init_cnt < (AH+2)'(N_HID))
        h_prev[init_cnt[AH-1:0]] <= HID_W'(fx_requant(64'(g_sample), 13 - HID_F, int'(HID_W)));
      else
        c_st[AH'(init_cnt - (AH+2)'(N_HID))] <= HID_W'(fx_requant(64'(g_sample), 13 - HID_F, int'(HID_W)));
    end
    if (st_we) begin
      c_st[st_addr]   <= c_wr;
      h_next[st_addr] <= h_wr;
    end
    if (state == S_OUT && wr_ready && out_i == AB'(BATCH - 1))
      h_prev <= h_next;
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr))
    else $error("lstm_top: write changed before it was accepted");

  initial begin
    assert (N_HID % BLOCK == 0) else $error("N_HID must be a multiple of BLOCK");
  end
endmodule
