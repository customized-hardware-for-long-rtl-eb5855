// buffer_x_batch: ping-pong buffer for one column block of a batch of input
// pairs (Buffer_X_Batch).
//
// The input pairs sit in off-chip memory as a row-major nSamples x N_IN
// matrix. The accelerator walks it in tiles: for every batch b of BATCH input
// pairs, for every block kb of BLOCK hidden units, for every block jb of
// BLOCK input columns, the BATCH x BLOCK sub-matrix
// X[b*BATCH .. b*BATCH+BATCH-1][jb*BLOCK .. jb*BLOCK+BLOCK-1] is needed once.
// The same batch columns are therefore fetched again for every hidden block,
// as the block-batching scheme prescribes. When N_IN is not a multiple of
// BLOCK the last column block is narrower (784 = 12*64 + 16 by default).
//
// Two banks alternate: while the compute side reads one complete tile, the
// loader fills the other with the next tile in the same (b, kb, jb) order.
// The loader stops only when both banks are full; the compute side waits only
// when its bank is not yet full.
//
// Interface: `start` (with x_base and n_batches) begins the tile sequence;
// `busy` stays high until the last tile has been written. Compute side:
// `cons_ready` means the current bank holds a complete tile; reads are
// combinational, rd_data = X tile[rd_row][rd_col]; a `cons_release` pulse
// frees the bank and moves to the other one. `stall` is high in cycles where
// the loader has a tile to fetch but both banks are full.
// Memory words are signed integers value*2^F; they are saturated into the
// <IN_W, IN_I> format on arrival.
module buffer_x_batch
  import lstm_pkg::*;
#(
  parameter int unsigned N_IN  = DEF_N_IN,
  parameter int unsigned N_HID = DEF_N_HID,
  parameter int unsigned BATCH = DEF_BATCH,
  parameter int unsigned BLOCK = DEF_BLOCK,
  parameter int unsigned IN_W  = DEF_IN_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [ADDR_W-1:0]      x_base,
  input  logic [15:0]            n_batches,
  output logic                   busy,
  output logic                   stall,
  // memory read port
  output logic                   req_valid,
  input  logic                   req_ready,
  output logic [ADDR_W-1:0]      req_addr,
  output logic [LEN_W-1:0]       req_len,
  input  logic                   rsp_valid,
  input  logic [DATA_W-1:0]      rsp_data,
  // compute side
  output logic                   cons_ready,
  input  logic                   cons_release,
  input  logic [$clog2(BATCH)-1:0] rd_row,
  input  logic [$clog2(BLOCK)-1:0] rd_col,
  output logic signed [IN_W-1:0] rd_data
);
  localparam int unsigned NJB    = (N_IN + BLOCK - 1) / BLOCK;
  localparam int unsigned NKB    = N_HID / BLOCK;
  localparam int unsigned LAST_W = N_IN - (NJB - 1) * BLOCK;

  logic signed [IN_W-1:0] mem [2][BATCH][BLOCK];

  typedef enum logic [1:0] {L_IDLE, L_WAIT, L_LOAD} lstate_e;
  lstate_e lstate;

  logic [1:0]        full;
  logic              wp, rp;
  logic [15:0]       b_cnt, nb_q;
  logic [15:0]       kb_cnt, jb_cnt;
  logic [ADDR_W-1:0] batch_addr;

  logic              br_start, br_busy, br_done, br_out_valid;
  logic [15:0]       br_group, br_row;
  logic [LEN_W-1:0]  br_col;
  logic [DATA_W-1:0] br_data;
  logic [ADDR_W-1:0] tile_base;
  logic [LEN_W-1:0]  tile_len;

  assign tile_base = batch_addr + ADDR_W'(jb_cnt) * ADDR_W'(BLOCK);
  assign tile_len  = (jb_cnt == 16'(NJB - 1)) ? LEN_W'(LAST_W) : LEN_W'(BLOCK);
  assign br_start  = (lstate == L_WAIT) && !full[wp];
  assign busy      = (lstate != L_IDLE);
  assign stall     = (lstate == L_WAIT) && full[wp];

  burst_reader #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .LEN_W(LEN_W), .CNT_W(16)) u_reader (
    .clk, .rst_n,
    .start       (br_start),
    .base        (tile_base),
    .n_groups    (16'd1),
    .group_stride('0),
    .n_rows      (16'(BATCH)),
    .row_stride  (ADDR_W'(N_IN)),
    .row_len     (tile_len),
    .busy        (br_busy),
    .done        (br_done),
    .req_valid, .req_ready, .req_addr, .req_len,
    .rsp_valid, .rsp_data,
    .out_valid   (br_out_valid),
    .out_group   (br_group),
    .out_row     (br_row),
    .out_col     (br_col),
    .out_data    (br_data)
  );

  // loader sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lstate <= L_IDLE;
      full <= '0; wp <= 1'b0; rp <= 1'b0;
      b_cnt <= '0; nb_q <= '0; kb_cnt <= '0; jb_cnt <= '0; batch_addr <= '0;
    end else begin
      if (cons_release) begin
        full[rp] <= 1'b0;
        rp       <= ~rp;
      end
      case (lstate)
        L_IDLE: if (start) begin
          full <= '0; wp <= 1'b0; rp <= 1'b0;
          b_cnt <= '0; kb_cnt <= '0; jb_cnt <= '0; nb_q <= n_batches;
          batch_addr <= x_base;
          lstate <= (n_batches == 0) ? L_IDLE : L_WAIT;
        end
        L_WAIT: if (!full[wp]) lstate <= L_LOAD;
        L_LOAD: if (br_done) begin
          full[wp] <= 1'b1;
          wp       <= ~wp;
          lstate   <= L_WAIT;
          if (jb_cnt == 16'(NJB - 1)) begin
            jb_cnt <= '0;
            if (kb_cnt == 16'(NKB - 1)) begin
              kb_cnt     <= '0;
              b_cnt      <= b_cnt + 1'b1;
              batch_addr <= batch_addr + ADDR_W'(BATCH) * ADDR_W'(N_IN);
              if (b_cnt == nb_q - 1'b1) lstate <= L_IDLE;
            end else begin
              kb_cnt <= kb_cnt + 1'b1;
            end
          end else begin
            jb_cnt <= jb_cnt + 1'b1;
          end
        end
        default: lstate <= L_IDLE;
      endcase
    end
  end

  // tile storage
  always_ff @(posedge clk) begin
    if (br_out_valid)
      mem[wp][br_row[$clog2(BATCH)-1:0]][br_col[$clog2(BLOCK)-1:0]] <=
        IN_W'(fx_requant(64'($signed(br_data)), 0, IN_W));
  end

  assign cons_ready = full[rp];
  assign rd_data    = mem[rp][rd_row][rd_col];

  assert property (@(posedge clk) disable iff (!rst_n) cons_release |-> full[rp])
    else $error("buffer_x_batch: release of an empty bank");

  initial begin
    assert (N_HID % BLOCK == 0) else $error("N_HID must be a multiple of BLOCK");
  end
endmodule
