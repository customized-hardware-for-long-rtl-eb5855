// tb_mem_model: behavioural word-addressed memory with NPORTS burst read
// ports and one write port, standing in for the off-chip DDR memory and its
// controller in simulation (not synthesizable logic).
//
// Each read port accepts a burst request (addr, len) when req_ready is high
// (randomly withheld when STALLS is set), queues it, and after LAT cycles
// returns its words in order, one per cycle when it is not randomly paused.
// The write port accepts wr_valid when wr_ready (also randomly withheld).
// Testbenches fill `mem` directly by hierarchical reference.
module tb_mem_model #(
  parameter int unsigned NPORTS = 1,
  parameter int unsigned WORDS  = 4096,
  parameter int unsigned LAT    = 3,
  parameter bit          STALLS = 1'b1
) (
  input  logic                    clk,
  input  logic [NPORTS-1:0]       req_valid,
  output logic [NPORTS-1:0]       req_ready,
  input  logic [NPORTS-1:0][31:0] req_addr,
  input  logic [NPORTS-1:0][15:0] req_len,
  output logic [NPORTS-1:0]       rsp_valid,
  output logic [NPORTS-1:0][31:0] rsp_data,
  input  logic                    wr_valid,
  output logic                    wr_ready,
  input  logic [31:0]             wr_addr,
  input  logic [31:0]             wr_data
);
  logic [31:0] mem [WORDS];

  int unsigned q_addr [NPORTS][$];
  int unsigned q_len  [NPORTS][$];
  int unsigned q_time [NPORTS][$];
  int unsigned cur_addr [NPORTS];
  int unsigned cur_left [NPORTS];
  longint unsigned now;
  int unsigned wr_count, rd_words;

  initial begin
    now = 0; wr_count = 0; rd_words = 0;
    req_ready = '0; rsp_valid = '0; rsp_data = '0; wr_ready = 1'b0;
    for (int p = 0; p < int'(NPORTS); p++) begin cur_left[p] = 0; cur_addr[p] = 0; end
  end

  always @(posedge clk) begin
    now <= now + 1;
    // accept requests presented in the cycle that just ended
    for (int p = 0; p < int'(NPORTS); p++) begin
      if (req_valid[p] && req_ready[p]) begin
        q_addr[p].push_back(req_addr[p]);
        q_len[p].push_back(req_len[p]);
        q_time[p].push_back(int'(now));
      end
    end
    if (wr_valid && wr_ready) begin
      assert (wr_addr < WORDS) else $error("tb_mem_model: write outside memory");
      mem[wr_addr] <= wr_data;
      wr_count <= wr_count + 1;
    end
    // drive this cycle's outputs
    for (int p = 0; p < int'(NPORTS); p++) begin
      req_ready[p] <= STALLS ? (($urandom % 8) != 0) : 1'b1;
      rsp_valid[p] <= 1'b0;
      if (cur_left[p] == 0 && q_addr[p].size() > 0 && (now - q_time[p][0]) >= LAT) begin
        cur_addr[p] = q_addr[p].pop_front();
        cur_left[p] = q_len[p].pop_front();
        void'(q_time[p].pop_front());
      end
      if (cur_left[p] != 0 && (!STALLS || ($urandom % 16) != 0)) begin
        assert (cur_addr[p] < WORDS) else $error("tb_mem_model: read outside memory");
        rsp_valid[p] <= 1'b1;
        rsp_data[p]  <= mem[cur_addr[p]];
        cur_addr[p]  = cur_addr[p] + 1;
        cur_left[p]  = cur_left[p] - 1;
        rd_words     <= rd_words + 1;
      end
    end
    wr_ready <= STALLS ? (($urandom % 4) != 0) : 1'b1;
  end
endmodule
