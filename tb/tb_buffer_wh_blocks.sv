// tb_buffer_wh_blocks: a small configuration (N_HID=16, N_OUT=3, block 8,
// two batches) is fetched from a randomly stalling memory model. For every
// hidden-block tile in order the consumer checks the recurrent weight
// columns, both gate bias vectors, the output-layer weight columns and the
// output biases against the memory layout, then releases the bank.
module tb_buffer_wh_blocks;
  import tb_ref_pkg::*;
  localparam int N_HID = 16, N_OUT = 3, BLOCK = 8, MEM_W = 14, NB = 2, NKB = N_HID / BLOCK;
  localparam int WH = 10, WL = 1200, BB = 1300;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, stall, cons_ready, cons_release = 1'b0;
  logic req_valid, req_ready, rsp_valid, wr_ready;
  logic [31:0] req_addr, rsp_data;
  logic [15:0] req_len;
  logic [$clog2(N_HID)-1:0] wh_rd_col;
  logic [$clog2(BLOCK)-1:0] wl_rd_col;
  logic signed [MEM_W-1:0] wh_rd_data [4][BLOCK], bi [4][BLOCK], bh [4][BLOCK];
  logic signed [MEM_W-1:0] wl_rd_data [N_OUT], bl [N_OUT];
  int checks = 0, failures = 0, stalls = 0;

  buffer_wh_blocks #(.N_HID(N_HID), .N_OUT(N_OUT), .BLOCK(BLOCK), .MEM_W(MEM_W)) dut (
    .clk, .rst_n, .start, .wh_base(32'(WH)), .wl_base(32'(WL)), .bias_base(32'(BB)),
    .n_batches(16'(NB)), .busy, .stall,
    .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data,
    .cons_ready, .cons_release, .wh_rd_col, .wh_rd_data, .bi, .bh,
    .wl_rd_col, .wl_rd_data, .bl);

  tb_mem_model #(.NPORTS(1), .WORDS(2048), .LAT(3)) u_mem (
    .clk, .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data,
    .wr_valid(1'b0), .wr_ready, .wr_addr(32'd0), .wr_data(32'd0));

  always #5 clk = ~clk;
  always @(posedge clk) if (stall) stalls++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input longint got, input int a, input string what);
    longint e;
    e = ref_requant(longint'($signed(u_mem.mem[a])), 0, MEM_W);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 8) $display("%s at address %0d: %0d expected %0d", what, a, got, e);
    end
  endtask

  initial begin
    for (int a = 0; a < 2048; a++) u_mem.mem[a] = 32'((a * 131) % 7000 - 3500);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int b = 0; b < NB; b++)
      for (int kb = 0; kb < NKB; kb++) begin
        repeat (1500) @(negedge clk);
        while (!cons_ready) @(negedge clk);
        for (int j = 0; j < N_HID; j++) begin
          wh_rd_col = $clog2(N_HID)'(j);
          #1;
          for (int g = 0; g < 4; g++)
            for (int k = 0; k < BLOCK; k++)
              cmp(longint'(wh_rd_data[g][k]), WH + g * N_HID * N_HID + (kb * BLOCK + k) * N_HID + j, "Wh");
        end
        for (int g = 0; g < 4; g++)
          for (int k = 0; k < BLOCK; k++) begin
            cmp(longint'(bi[g][k]), BB + g * N_HID + kb * BLOCK + k, "b_i");
            cmp(longint'(bh[g][k]), BB + 4 * N_HID + g * N_HID + kb * BLOCK + k, "b_h");
          end
        for (int k = 0; k < BLOCK; k++) begin
          wl_rd_col = $clog2(BLOCK)'(k);
          #1;
          for (int m = 0; m < N_OUT; m++) cmp(longint'(wl_rd_data[m]), WL + m * N_HID + kb * BLOCK + k, "Wl");
        end
        for (int m = 0; m < N_OUT; m++) cmp(longint'(bl[m]), BB + 8 * N_HID + m, "b_l");
        @(negedge clk);
        cons_release = 1'b1;
        @(negedge clk) cons_release = 1'b0;
      end
    repeat (20) @(negedge clk);
    checks++; if (busy || cons_ready) begin failures++; $display("extra tiles or loader still busy"); end
    checks++; if (stalls == 0) begin failures++; $display("loader never ran ahead"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
