// buffer_wh_blocks: ping-pong buffer for everything one hidden block needs
// besides the input pairs and input weights (Buffer_Wh_Blocks, plus the bias
// fetch behind Init_tmp_Block and Init_L_Block).
//
// For hidden block kb (hidden units kb*BLOCK .. kb*BLOCK+BLOCK-1) a tile holds:
//   * Wh: rows kb*BLOCK.. of the four N_HID x N_HID recurrent weight matrices
//     W_hf, W_hi, W_hz, W_ho (all N_HID columns),
//   * bi, bh: the BLOCK input-side and hidden-side biases of each gate,
//   * Wl: columns kb*BLOCK.. of the N_OUT x N_HID output-layer weights,
//   * bl: the N_OUT output-layer biases.
// Memory layout: Wh gate matrices row-major one after the other (order
// f, i, z, o) from wh_base; Wl row-major from wl_base; at bias_base the
// input-side biases b_i[4][N_HID], then the hidden-side biases b_h[4][N_HID],
// then b_l[N_OUT]. The five parts are fetched one after another with the
// same burst reader. Tiles follow the (batch, kb) order of consumption.
// Fetching the output-layer weights and biases here is this
// implementation's choice; the design does not say which block buffers them.
//
// Interface: `start`/`busy`/`stall` and `cons_ready`/`cons_release` as in
// buffer_x_batch. Reads are combinational:
//   wh_rd_data[g][k] = W_hg[kb*BLOCK+k][wh_rd_col]
//   wl_rd_data[m]    = W_l[m][kb*BLOCK+wl_rd_col]
// and bi, bh, bl are the whole bias vectors of the current tile.
module buffer_wh_blocks
  import lstm_pkg::*;
#(
  parameter int unsigned N_HID = DEF_N_HID,
  parameter int unsigned N_OUT = DEF_N_OUT,
  parameter int unsigned BLOCK = DEF_BLOCK,
  parameter int unsigned MEM_W = DEF_MEM_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [ADDR_W-1:0]      wh_base,
  input  logic [ADDR_W-1:0]      wl_base,
  input  logic [ADDR_W-1:0]      bias_base,
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
  input  logic [$clog2(N_HID)-1:0] wh_rd_col,
  output logic signed [MEM_W-1:0] wh_rd_data [NGATES][BLOCK],
  output logic signed [MEM_W-1:0] bi [NGATES][BLOCK],
  output logic signed [MEM_W-1:0] bh [NGATES][BLOCK],
  input  logic [$clog2(BLOCK)-1:0] wl_rd_col,
  output logic signed [MEM_W-1:0] wl_rd_data [N_OUT],
  output logic signed [MEM_W-1:0] bl [N_OUT]
);
  localparam int unsigned NKB = N_HID / BLOCK;

  logic signed [MEM_W-1:0] wh_mem [2][N_HID][NGATES][BLOCK];
  logic signed [MEM_W-1:0] bi_mem [2][NGATES][BLOCK];
  logic signed [MEM_W-1:0] bh_mem [2][NGATES][BLOCK];
  logic signed [MEM_W-1:0] wl_mem [2][BLOCK][N_OUT];
  logic signed [MEM_W-1:0] bl_mem [2][N_OUT];

  typedef enum logic [1:0] {L_IDLE, L_WAIT, L_LOAD} lstate_e;
  typedef enum logic [2:0] {P_WH, P_BI, P_BH, P_WL, P_BL} part_e;
  lstate_e lstate;
  part_e   part;

  logic [1:0]        full;
  logic              wp, rp;
  logic [15:0]       b_cnt, nb_q, kb_cnt;
  logic [ADDR_W-1:0] kb_off;     // kb*BLOCK

  logic              br_start, br_busy, br_done, br_out_valid;
  logic [15:0]       br_group, br_row;
  logic [LEN_W-1:0]  br_col;
  logic [DATA_W-1:0] br_data;
  logic [ADDR_W-1:0] p_base, p_gstride, p_rstride;
  logic [15:0]       p_groups, p_rows;
  logic [LEN_W-1:0]  p_len;

  // geometry of the part being fetched
  always_comb begin
    p_base = '0; p_gstride = '0; p_rstride = '0; p_groups = 16'd1; p_rows = 16'd1;
    p_len  = LEN_W'(BLOCK);
    case (part)
      P_WH: begin
        p_base    = wh_base + kb_off * ADDR_W'(N_HID);
        p_groups  = 16'(NGATES);
        p_gstride = ADDR_W'(N_HID) * ADDR_W'(N_HID);
        p_rows    = 16'(BLOCK);
        p_rstride = ADDR_W'(N_HID);
        p_len     = LEN_W'(N_HID);
      end
      P_BI: begin
        p_base    = bias_base + kb_off;
        p_groups  = 16'(NGATES);
        p_gstride = ADDR_W'(N_HID);
      end
      P_BH: begin
        p_base    = bias_base + ADDR_W'(NGATES * N_HID) + kb_off;
        p_groups  = 16'(NGATES);
        p_gstride = ADDR_W'(N_HID);
      end
      P_WL: begin
        p_base    = wl_base + kb_off;
        p_rows    = 16'(N_OUT);
        p_rstride = ADDR_W'(N_HID);
      end
      default: begin  // P_BL
        p_base = bias_base + ADDR_W'(2 * NGATES * N_HID);
        p_len  = LEN_W'(N_OUT);
      end
    endcase
  end

  assign br_start = (lstate == L_WAIT) && !full[wp];
  assign busy     = (lstate != L_IDLE);
  assign stall    = (lstate == L_WAIT) && full[wp] && (part == P_WH);

  burst_reader #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .LEN_W(LEN_W), .CNT_W(16)) u_reader (
    .clk, .rst_n,
    .start       (br_start),
    .base        (p_base),
    .n_groups    (p_groups),
    .group_stride(p_gstride),
    .n_rows      (p_rows),
    .row_stride  (p_rstride),
    .row_len     (p_len),
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
      part   <= P_WH;
      full <= '0; wp <= 1'b0; rp <= 1'b0;
      b_cnt <= '0; nb_q <= '0; kb_cnt <= '0; kb_off <= '0;
    end else begin
      if (cons_release) begin
        full[rp] <= 1'b0;
        rp       <= ~rp;
      end
      case (lstate)
        L_IDLE: if (start) begin
          full <= '0; wp <= 1'b0; rp <= 1'b0; part <= P_WH;
          b_cnt <= '0; kb_cnt <= '0; kb_off <= '0; nb_q <= n_batches;
          lstate <= (n_batches == 0) ? L_IDLE : L_WAIT;
        end
        L_WAIT: if (!full[wp]) lstate <= L_LOAD;
        L_LOAD: if (br_done) begin
          if (part != P_BL) begin
            part   <= part_e'(part + 1'b1);
            lstate <= L_WAIT;   // bank still empty: next part starts at once
          end else begin
            part     <= P_WH;
            full[wp] <= 1'b1;
            wp       <= ~wp;
            lstate   <= L_WAIT;
            if (kb_cnt == 16'(NKB - 1)) begin
              kb_cnt <= '0;
              kb_off <= '0;
              b_cnt  <= b_cnt + 1'b1;
              if (b_cnt == nb_q - 1'b1) lstate <= L_IDLE;
            end else begin
              kb_cnt <= kb_cnt + 1'b1;
              kb_off <= kb_off + ADDR_W'(BLOCK);
            end
          end
        end
        default: lstate <= L_IDLE;
      endcase
    end
  end

  logic signed [MEM_W-1:0] wval;
  assign wval = MEM_W'(fx_requant(64'($signed(br_data)), 0, MEM_W));

  always_ff @(posedge clk) begin
    if (br_out_valid) begin
      case (part)
        P_WH: wh_mem[wp][br_col[$clog2(N_HID)-1:0]][br_group[1:0]][br_row[$clog2(BLOCK)-1:0]] <= wval;
        P_BI: bi_mem[wp][br_group[1:0]][br_col[$clog2(BLOCK)-1:0]] <= wval;
        P_BH: bh_mem[wp][br_group[1:0]][br_col[$clog2(BLOCK)-1:0]] <= wval;
        P_WL: wl_mem[wp][br_col[$clog2(BLOCK)-1:0]][br_row[$clog2(N_OUT)-1:0]] <= wval;
        default: bl_mem[wp][br_col[$clog2(N_OUT)-1:0]] <= wval;
      endcase
    end
  end

  assign cons_ready = full[rp];
  assign wh_rd_data = wh_mem[rp][wh_rd_col];
  assign bi         = bi_mem[rp];
  assign bh         = bh_mem[rp];
  assign wl_rd_data = wl_mem[rp][wl_rd_col];
  assign bl         = bl_mem[rp];

  assert property (@(posedge clk) disable iff (!rst_n) cons_release |-> full[rp])
    else $error("buffer_wh_blocks: release of an empty bank");
endmodule
