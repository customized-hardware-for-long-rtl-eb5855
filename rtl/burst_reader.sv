// burst_reader: fetches a strided 3-D block of words from off-chip memory.
//
// The block is n_groups x n_rows x row_len words. Word (g, r, c) lives at
// address base + g*group_stride + r*row_stride + c. One read burst of
// row_len words is requested per row; bursts are issued back to back as fast
// as the memory accepts them and any number may be outstanding. Responses
// are assumed to come back in request order (as on a single AXI read
// channel with one ID), so each returned word is labelled with its (group,
// row, column) by counters that walk the block in the same order.
//
// Interface: a `start` pulse with the geometry begins a transfer; `busy` is
// high until the last word has arrived, when `done` pulses for one cycle.
// Request channel: req_valid/req_ready handshake carrying req_addr and
// req_len (words). Response channel: rsp_valid qualifies rsp_data; there is
// no back-pressure, every response word is accepted in the cycle it arrives.
// Each accepted word appears on out_* in the same cycle (combinational).
// The burst-per-row scheme follows the design's use of sequential AXI
// master bursts; the simplified request/response channel is this
// implementation's own.
module burst_reader #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned LEN_W  = 16,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [CNT_W-1:0]  n_groups,
  input  logic [ADDR_W-1:0] group_stride,
  input  logic [CNT_W-1:0]  n_rows,
  input  logic [ADDR_W-1:0] row_stride,
  input  logic [LEN_W-1:0]  row_len,
  output logic              busy,
  output logic              done,
  // memory read request channel
  output logic              req_valid,
  input  logic              req_ready,
  output logic [ADDR_W-1:0] req_addr,
  output logic [LEN_W-1:0]  req_len,
  // memory read response channel
  input  logic              rsp_valid,
  input  logic [DATA_W-1:0] rsp_data,
  // labelled words
  output logic              out_valid,
  output logic [CNT_W-1:0]  out_group,
  output logic [CNT_W-1:0]  out_row,
  output logic [LEN_W-1:0]  out_col,
  output logic [DATA_W-1:0] out_data
);
  // latched geometry
  logic [CNT_W-1:0]  ng_q, nr_q;
  logic [ADDR_W-1:0] gs_q, rs_q;
  logic [LEN_W-1:0]  len_q;
  // request side
  logic              req_pending;
  logic [CNT_W-1:0]  qg, qr;
  logic [ADDR_W-1:0] grp_addr, row_addr;
  // response side
  logic [CNT_W-1:0]  pg, pr;
  logic [LEN_W-1:0]  pc;

  assign req_valid = req_pending;
  assign req_addr  = row_addr;
  assign req_len   = len_q;

  assign out_valid = busy && rsp_valid;
  assign out_group = pg;
  assign out_row   = pr;
  assign out_col   = pc;
  assign out_data  = rsp_data;

  logic last_word;
  assign last_word = (pc == len_q - 1'b1) && (pr == nr_q - 1'b1) && (pg == ng_q - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      req_pending <= 1'b0;
      ng_q <= '0; nr_q <= '0; gs_q <= '0; rs_q <= '0; len_q <= '0;
      qg <= '0; qr <= '0; grp_addr <= '0; row_addr <= '0;
      pg <= '0; pr <= '0; pc <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy        <= 1'b1;
        req_pending <= 1'b1;
        ng_q <= n_groups; nr_q <= n_rows; gs_q <= group_stride; rs_q <= row_stride;
        len_q <= row_len;
        qg <= '0; qr <= '0;
        grp_addr <= base; row_addr <= base;
        pg <= '0; pr <= '0; pc <= '0;
      end else if (busy) begin
        // request generator: one burst per row
        if (req_pending && req_ready) begin
          if (qr == nr_q - 1'b1) begin
            qr <= '0;
            if (qg == ng_q - 1'b1) begin
              req_pending <= 1'b0;
            end else begin
              qg       <= qg + 1'b1;
              grp_addr <= grp_addr + gs_q;
              row_addr <= grp_addr + gs_q;
            end
          end else begin
            qr       <= qr + 1'b1;
            row_addr <= row_addr + rs_q;
          end
        end
        // response labelling
        if (rsp_valid) begin
          if (last_word) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
          if (pc == len_q - 1'b1) begin
            pc <= '0;
            if (pr == nr_q - 1'b1) begin
              pr <= '0;
              pg <= pg + 1'b1;
            end else begin
              pr <= pr + 1'b1;
            end
          end else begin
            pc <= pc + 1'b1;
          end
        end
      end
    end
  end

  // A response can only follow a request.
  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> busy)
    else $error("burst_reader: response word while idle");
  // The request must stay stable while it waits for ready.
  assert property (@(posedge clk) disable iff (!rst_n)
                   req_valid && !req_ready |=> req_valid && $stable(req_addr))
    else $error("burst_reader: request changed before it was accepted");
endmodule
