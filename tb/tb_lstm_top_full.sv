// tb_lstm_top_full: end-to-end test of the accelerator at its default size
// (784-128-10 network, batches of 500 pairs, 64-wide tiles, so thirteen
// column tiles with a 16-wide last one and two hidden blocks) with no
// parameter override on the top, one batch, against the step-by-step
// reference model in tb_lstm_top_body.svh.
module tb_lstm_top_full;
  localparam int N_IN  = lstm_pkg::DEF_N_IN;
  localparam int N_HID = lstm_pkg::DEF_N_HID;
  localparam int N_OUT = lstm_pkg::DEF_N_OUT;
  localparam int BATCH = lstm_pkg::DEF_BATCH;
  localparam int BLOCK = lstm_pkg::DEF_BLOCK;
  localparam int NB    = 1;

  lstm_top dut (
    .clk, .rst_n, .start, .n_batches(16'(NB)),
    .x_base(32'(XB)), .wi_base(32'(WIB)), .wh_base(32'(WHB)), .wl_base(32'(WLB)),
    .bias_base(32'(BB)), .out_base(32'(OB)), .seed, .busy, .done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len, .rd_rsp_valid, .rd_rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb_lstm_top_body.svh"
endmodule
