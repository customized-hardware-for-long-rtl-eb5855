// gprng: Gaussian pseudo-random number generator built from four LFSRs.
//
// Four 16-bit Fibonacci LFSRs (lfsr16), each with its own seed, produce four
// uniformly distributed numbers every clock. Read as signed 16-bit values
// they are added in a two-level tree (two pair sums, then the sum of the
// sums) and the 18-bit total is shifted right by two, giving their mean. By
// the central limit theorem the mean of four uniforms is close to a normal
// distribution (zero mean, standard deviation 2^16/sqrt(12)/2 ~ 9459 LSB).
// The four-LFSR, adder-tree structure follows the design; the exact
// scaling (divide by four) is this implementation's choice.
//
// Interface: `load` seeds all four LFSRs from `seed[0..3]`. While `en` is
// high one sample is produced per clock: `sample` is registered and
// `sample_valid` follows `en` by one cycle.
module gprng (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [3:0][15:0]   seed,
  input  logic               en,
  output logic signed [15:0] sample,
  output logic               sample_valid
);
  logic [3:0][15:0] u;

  for (genvar n = 0; n < 4; n++) begin : g_lfsr
    lfsr16 u_lfsr (
      .clk  (clk),
      .rst_n(rst_n),
      .load (load),
      .seed (seed[n]),
      .en   (en),
      .q    (u[n])
    );
  end

  // Two-level adder tree
  logic signed [16:0] s01, s23;
  logic signed [17:0] s_all;
  assign s01   = 17'($signed(u[0])) + 17'($signed(u[1]));
  assign s23   = 17'($signed(u[2])) + 17'($signed(u[3]));
  assign s_all = 18'(s01) + 18'(s23);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= en & ~load;
      if (en) sample <= 16'(s_all >>> 2);
    end
  end
endmodule
