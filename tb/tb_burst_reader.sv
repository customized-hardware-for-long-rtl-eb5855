// tb_burst_reader: fetches strided 3-D blocks of different shapes from a
// memory model that withholds ready and pauses responses at random, and
// checks every labelled word (group, row, column and data, where each memory
// word holds its own address), the word count, and that `done` comes once
// per transfer.
module tb_burst_reader;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic [31:0] base, gstride, rstride;
  logic [15:0] ngroups, nrows, rlen;
  logic req_valid, req_ready, rsp_valid, out_valid;
  logic [31:0] req_addr, rsp_data, out_data;
  logic [15:0] req_len, out_group, out_row, out_col;
  logic wr_ready;
  int checks = 0, failures = 0;

  burst_reader #(.ADDR_W(32), .DATA_W(32), .LEN_W(16), .CNT_W(16)) dut (
    .clk, .rst_n, .start, .base, .n_groups(ngroups), .group_stride(gstride),
    .n_rows(nrows), .row_stride(rstride), .row_len(rlen), .busy, .done,
    .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data,
    .out_valid, .out_group, .out_row, .out_col, .out_data);

  tb_mem_model #(.NPORTS(1), .WORDS(8192), .LAT(4)) u_mem (
    .clk, .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data,
    .wr_valid(1'b0), .wr_ready, .wr_addr(32'd0), .wr_data(32'd0));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int eg, er, ec, nwords, ndone;
  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      nwords++;
      if (out_group != 16'(eg) || out_row != 16'(er) || out_col != 16'(ec) ||
          out_data != base + 32'(eg) * gstride + 32'(er) * rstride + 32'(ec)) begin
        failures++;
        if (failures < 6) $display("word g%0d r%0d c%0d data %0d, expected g%0d r%0d c%0d", out_group, out_row, out_col, out_data, eg, er, ec);
      end
      ec++;
      if (ec == int'(rlen)) begin ec = 0; er++; if (er == int'(nrows)) begin er = 0; eg++; end end
    end
    if (done) ndone++;
  end

  task automatic run(input int b, input int ng, input int gs, input int nr, input int rs, input int rl);
    @(negedge clk);
    base = 32'(b); ngroups = 16'(ng); gstride = 32'(gs); nrows = 16'(nr); rstride = 32'(rs); rlen = 16'(rl);
    eg = 0; er = 0; ec = 0; nwords = 0; ndone = 0;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (nwords != ng * nr * rl || ndone != 1 || busy) begin
      failures++;
      $display("transfer %0dx%0dx%0d: %0d words, %0d done pulses", ng, nr, rl, nwords, ndone);
    end
  endtask

  initial begin
    start = 1'b0;
    for (int a = 0; a < 8192; a++) u_mem.mem[a] = 32'(a);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(100, 1, 0, 7, 50, 13);
    run(0, 4, 1000, 5, 64, 16);
    run(3000, 2, 7, 1, 0, 1);
    run(17, 3, 900, 10, 80, 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
