// tb_buffer_x_batch: a small configuration (N_IN=20 so the last column block
// is narrower, two hidden blocks, batch of 3, block of 8, two batches) is
// fetched from a randomly stalling memory model. A slow consumer walks the
// tiles in (batch, hidden block, column block) order, checks every word of
// every tile against the memory image (with saturation of an out-of-range
// word), and releases the bank. It checks that the loader really runs ahead
// (it is seen stalled with both banks full) and that the tile count is right.
module tb_buffer_x_batch;
  import tb_ref_pkg::*;
  localparam int N_IN = 20, N_HID = 16, BATCH = 3, BLOCK = 8, IN_W = 18, NB = 2;
  localparam int NJB = (N_IN + BLOCK - 1) / BLOCK, NKB = N_HID / BLOCK;
  localparam int XB = 40;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, stall, cons_ready, cons_release = 1'b0;
  logic req_valid, req_ready, rsp_valid, wr_ready;
  logic [31:0] req_addr, rsp_data;
  logic [15:0] req_len;
  logic [$clog2(BATCH)-1:0] rd_row;
  logic [$clog2(BLOCK)-1:0] rd_col;
  logic signed [IN_W-1:0] rd_data;
  int checks = 0, failures = 0, stalls = 0;

  buffer_x_batch #(.N_IN(N_IN), .N_HID(N_HID), .BATCH(BATCH), .BLOCK(BLOCK), .IN_W(IN_W)) dut (
    .clk, .rst_n, .start, .x_base(32'(XB)), .n_batches(16'(NB)), .busy, .stall,
    .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data,
    .cons_ready, .cons_release, .rd_row, .rd_col, .rd_data);

  tb_mem_model #(.NPORTS(1), .WORDS(1024), .LAT(3)) u_mem (
    .clk, .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data,
    .wr_valid(1'b0), .wr_ready, .wr_addr(32'd0), .wr_data(32'd0));

  always #5 clk = ~clk;
  always @(posedge clk) if (stall) stalls++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xval(input int s, input int c);
    return (s * 37 + c * 11) * 613 - 40000;
  endfunction

  initial begin
    int tiles;
    for (int s = 0; s < NB * BATCH; s++)
      for (int c = 0; c < N_IN; c++) u_mem.mem[XB + s * N_IN + c] = 32'(xval(s, c));
    u_mem.mem[XB + 1 * N_IN + 19] = 32'(1 << 20);      // saturates high
    u_mem.mem[XB + 4 * N_IN + 2]  = 32'(-(1 << 21));   // saturates low
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    tiles = 0;
    for (int b = 0; b < NB; b++)
      for (int kb = 0; kb < NKB; kb++)
        for (int jb = 0; jb < NJB; jb++) begin
          int w;
          w = (jb == NJB - 1) ? N_IN - jb * BLOCK : BLOCK;
          repeat (150) @(negedge clk);   // slow consumer: lets the loader fill both banks
          while (!cons_ready) @(negedge clk);
          for (int i = 0; i < BATCH; i++)
            for (int j = 0; j < w; j++) begin
              int s, c;
              longint e;
              s = b * BATCH + i; c = jb * BLOCK + j;
              rd_row = $clog2(BATCH)'(i); rd_col = $clog2(BLOCK)'(j);
              #1;
              e = ref_requant(longint'($signed(u_mem.mem[XB + s * N_IN + c])), 0, IN_W);
              checks++;
              if (longint'(rd_data) != e) begin
                failures++;
                if (failures < 6) $display("b%0d kb%0d jb%0d x[%0d][%0d]=%0d expected %0d", b, kb, jb, s, c, rd_data, e);
              end
            end
          @(negedge clk);
          cons_release = 1'b1;
          @(negedge clk) cons_release = 1'b0;
          tiles++;
        end
    repeat (20) @(negedge clk);
    checks++; if (busy || cons_ready) begin failures++; $display("extra tiles or loader still busy"); end
    checks++; if (stalls == 0) begin failures++; $display("loader never ran ahead"); end
    $display("tiles %0d, loader stall cycles %0d", tiles, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
