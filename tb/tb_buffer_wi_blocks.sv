// tb_buffer_wi_blocks: a small configuration (N_IN=20, N_HID=16, block 8,
// two batches) is fetched from a randomly stalling memory model. The
// consumer walks the tiles in (batch, hidden block, column block) order and,
// for every column of every tile, checks the 4 x BLOCK weights against the
// row-major gate matrices in memory, then releases the bank. It also checks
// that the loader ran ahead and that no extra tile is produced.
module tb_buffer_wi_blocks;
  import tb_ref_pkg::*;
  localparam int N_IN = 20, N_HID = 16, BLOCK = 8, MEM_W = 14, NB = 2;
  localparam int NJB = (N_IN + BLOCK - 1) / BLOCK, NKB = N_HID / BLOCK;
  localparam int WB = 100;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, stall, cons_ready, cons_release = 1'b0;
  logic req_valid, req_ready, rsp_valid, wr_ready;
  logic [31:0] req_addr, rsp_data;
  logic [15:0] req_len;
  logic [$clog2(BLOCK)-1:0] rd_col;
  logic signed [MEM_W-1:0] rd_data [4][BLOCK];
  int checks = 0, failures = 0, stalls = 0;

  buffer_wi_blocks #(.N_IN(N_IN), .N_HID(N_HID), .BLOCK(BLOCK), .MEM_W(MEM_W)) dut (
    .clk, .rst_n, .start, .wi_base(32'(WB)), .n_batches(16'(NB)), .busy, .stall,
    .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data,
    .cons_ready, .cons_release, .rd_col, .rd_data);

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

  initial begin
    for (int a = 0; a < 4 * N_HID * N_IN; a++) u_mem.mem[WB + a] = 32'((a * 97) % 9000 - 4500);
    u_mem.mem[WB + 5] = 32'(50000);   // saturates
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int b = 0; b < NB; b++)
      for (int kb = 0; kb < NKB; kb++)
        for (int jb = 0; jb < NJB; jb++) begin
          int w;
          w = (jb == NJB - 1) ? N_IN - jb * BLOCK : BLOCK;
          repeat (300) @(negedge clk);
          while (!cons_ready) @(negedge clk);
          for (int j = 0; j < w; j++) begin
            rd_col = $clog2(BLOCK)'(j);
            #1;
            for (int g = 0; g < 4; g++)
              for (int k = 0; k < BLOCK; k++) begin
                int a;
                longint e;
                a = WB + g * N_HID * N_IN + (kb * BLOCK + k) * N_IN + jb * BLOCK + j;
                e = ref_requant(longint'($signed(u_mem.mem[a])), 0, MEM_W);
                checks++;
                if (longint'(rd_data[g][k]) != e) begin
                  failures++;
                  if (failures < 6) $display("b%0d kb%0d jb%0d g%0d k%0d j%0d: %0d expected %0d", b, kb, jb, g, k, j, rd_data[g][k], e);
                end
              end
          end
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
