// tb_lstm_top: end-to-end test of the accelerator at a reduced size
// (N_IN=44 with a narrow last column tile, N_HID=16 in two hidden blocks of 8,
// N_OUT=10, batches of 6, three batches) against the step-by-step reference
// model in tb_lstm_top_body.svh.
module tb_lstm_top;
  localparam int N_IN = 44, N_HID = 16, N_OUT = 10, BATCH = 6, BLOCK = 8, NB = 3;

  lstm_top #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .BATCH(BATCH), .BLOCK(BLOCK)) dut (
    .clk, .rst_n, .start, .n_batches(16'(NB)),
    .x_base(32'(XB)), .wi_base(32'(WIB)), .wh_base(32'(WHB)), .wl_base(32'(WLB)),
    .bias_base(32'(BB)), .out_base(32'(OB)), .seed, .busy, .done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len, .rd_rsp_valid, .rd_rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb_lstm_top_body.svh"
endmodule
