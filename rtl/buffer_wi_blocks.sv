// buffer_wi_blocks: ping-pong buffer for one tile of the input weight
// matrices W_if, W_ii, W_iz, W_io (Buffer_Wi_Blocks).
//
// Each gate matrix is N_HID x N_IN, row-major, the four stored one after the
// other in gate order f, i, z, o starting at wi_base. A tile is, for each of
// the four gates, the BLOCK x BLOCK sub-matrix rows kb*BLOCK.., columns
// jb*BLOCK.. (narrower for the last column block). Tiles are fetched in the
// same (batch, kb, jb) order in which the compute side consumes them, so the
// same weights are fetched once per batch and reused for all BATCH input
// pairs of it.
//
// The buffer is organised by column: one read returns, for a column j of the
// tile, the BLOCK weights of every gate, which is what the compute side needs
// to update BLOCK accumulators of four gates from one input value.
//
// Interface and handshake are those of buffer_x_batch: `start`/`busy` for the
// loader, `cons_ready`/`cons_release` for the compute side, combinational
// read rd_data[g][k] = W_g[kb*BLOCK+k][jb*BLOCK+rd_col], `stall` when the
// loader is held up by two full banks. Words are saturated into <MEM_W,MEM_I>.
module buffer_wi_blocks
  import lstm_pkg::*;
#(
  parameter int unsigned N_IN  = DEF_N_IN,
  parameter int unsigned N_HID = DEF_N_HID,
  parameter int unsigned BLOCK = DEF_BLOCK,
  parameter int unsigned MEM_W = DEF_MEM_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [ADDR_W-1:0]      wi_base,
  input  logic [15:0]            n_batches,
  output logic                   busy,
  output logic                   stall,
  output logic                   req_valid,
  input  logic                   req_ready,
  output logic [ADDR_W-1:0]      req_addr,
  output logic [LEN_W-1:0]       req_len,
  input  logic                   rsp_valid,
  input  logic [DATA_W-1:0]      rsp_data,
  output logic                   cons_ready,
  input  logic                   cons_release,
  input  logic [$clog2(BLOCK)-1:0] rd_col,
  output logic signed [MEM_W-1:0] rd_data [NGATES][BLOCK]
);
  localparam int unsigned NJB    = (N_IN + BLOCK - 1) / BLOCK;
  localparam int unsigned NKB    = N_HID / BLOCK;
  localparam int unsigned LAST_W = N_IN - (NJB - 1) * BLOCK;

  logic signed [MEM_W-1:0] mem [2][BLOCK][NGATES][BLOCK];

  typedef enum logic [1:0] {L_IDLE, L_WAIT, L_LOAD} lstate_e;
  lstate_e lstate;

  logic [1:0]        full;
  logic              wp, rp;
  logic [15:0]       b_cnt, nb_q, kb_cnt, jb_cnt;
  logic [ADDR_W-1:0] kb_addr;

  logic              br_start, br_busy, br_done, br_out_valid;
  logic [15:0]       br_group, br_row;
  logic [LEN_W-1:0]  br_col;
  logic [DATA_W-1:0] br_data;
  logic [ADDR_W-1:0] tile_base;
  logic [LEN_W-1:0]  tile_len;

  assign tile_base = kb_addr + ADDR_W'(jb_cnt) * ADDR_W'(BLOCK);
  assign tile_len  = (jb_cnt == 16'(NJB - 1)) ? LEN_W'(LAST_W) : LEN_W'(BLOCK);
  assign br_start  = (lstate == L_WAIT) && !full[wp];
  assign busy      = (lstate != L_IDLE);
  assign stall     = (lstate == L_WAIT) && full[wp];

  burst_reader #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .LEN_W(LEN_W), .CNT_W(16)) u_reader (
    .clk, .rst_n,
    .start       (br_start),
    .base        (tile_base),
    .n_groups    (16'(NGATES)),
    .group_stride(ADDR_W'(N_HID) * ADDR_W'(N_IN)),
    .n_rows      (16'(BLOCK)),
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

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lstate <= L_IDLE;
      full <= '0; wp <= 1'b0; rp <= 1'b0;
      b_cnt <= '0; nb_q <= '0; kb_cnt <= '0; jb_cnt <= '0; kb_addr <= '0;
    end else begin
      if (cons_release) begin
        full[rp] <= 1'b0;
        rp       <= ~rp;
      end
      case (lstate)
        L_IDLE: if (start) begin
          full <= '0; wp <= 1'b0; rp <= 1'b0;
          b_cnt <= '0; kb_cnt <= '0; jb_cnt <= '0; nb_q <= n_batches;
          kb_addr <= wi_base;
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
              kb_cnt  <= '0;
              kb_addr <= wi_base;
              b_cnt   <= b_cnt + 1'b1;
              if (b_cnt == nb_q - 1'b1) lstate <= L_IDLE;
            end else begin
              kb_cnt  <= kb_cnt + 1'b1;
              kb_addr <= kb_addr + ADDR_W'(BLOCK) * ADDR_W'(N_IN);
            end
          end else begin
            jb_cnt <= jb_cnt + 1'b1;
          end
        end
        default: lstate <= L_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (br_out_valid)
      mem[wp][br_col[$clog2(BLOCK)-1:0]][br_group[1:0]][br_row[$clog2(BLOCK)-1:0]] <=
        MEM_W'(fx_requant(64'($signed(br_data)), 0, MEM_W));
  end

  assign cons_ready = full[rp];
  assign rd_data    = mem[rp][rd_col];

  assert property (@(posedge clk) disable iff (!rst_n) cons_release |-> full[rp])
    else $error("buffer_wi_blocks: release of an empty bank");
endmodule
