// tb_lstm_top_h32: end-to-end test of the accelerator elaborated for the
// 784-32-10 network used for the accuracy study (full input width, 32 hidden
// units, 10 classes) with the smallest tile edge of the block-size study
// (BLOCK = 16, so two hidden blocks and 49 column tiles), batches reduced to
// 20 pairs, two batches, against the step-by-step reference model in
// tb_lstm_top_body.svh.
module tb_lstm_top_h32;
  localparam int N_IN = 784, N_HID = 32, N_OUT = 10, BATCH = 20, BLOCK = 16, NB = 2;

  lstm_top #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .BATCH(BATCH), .BLOCK(BLOCK)) dut (
    .clk, .rst_n, .start, .n_batches(16'(NB)),
    .x_base(32'(XB)), .wi_base(32'(WIB)), .wh_base(32'(WHB)), .wl_base(32'(WLB)),
    .bias_base(32'(BB)), .out_base(32'(OB)), .seed, .busy, .done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len, .rd_rsp_valid, .rd_rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb_lstm_top_body.svh"
endmodule
