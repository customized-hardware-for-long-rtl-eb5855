// lstm_pkg: constants, types and fixed-point helpers shared by the LSTM
// accelerator.
//
// Every number in the datapath is a signed two's-complement fixed-point value
// described by a <W,I> pair: W bits in total, I of them integer bits
// (including the sign), so F = W - I fraction bits. The default formats are
// the ones of the reference configuration: input pairs <18,2>, weights and
// biases ("Mem") <14,6>, hidden and cell state <14,6>, accumulators and gate
// values ("Calc") <14,6>, and a 4-bit class index at the output.
//
// Rounding follows truncation toward minus infinity and overflow saturates to
// the largest or smallest representable value (saturation is what the design
// asks for; truncation is this implementation's choice of quantisation mode).
// fx_requant() does both in one place: it takes a wide exact value with some
// number of fraction bits, shifts it to the target fraction count and clamps
// it to a W-bit signed range. The result is returned sign-extended in 64 bits;
// callers keep the low W bits.
//
// Off-chip memory is word addressed; one DATA_W-bit word holds one value as a
// signed integer equal to value * 2^F of that value's format.
package lstm_pkg;

  // Reference configuration (network dimensions, batch/block sizes, formats)
  localparam int unsigned DEF_N_IN   = 784;
  localparam int unsigned DEF_N_HID  = 128;
  localparam int unsigned DEF_N_OUT  = 10;
  localparam int unsigned DEF_BATCH  = 500;
  localparam int unsigned DEF_BLOCK  = 64;
  localparam int unsigned DEF_IN_W   = 18;
  localparam int unsigned DEF_IN_I   = 2;
  localparam int unsigned DEF_HID_W  = 14;
  localparam int unsigned DEF_HID_I  = 6;
  localparam int unsigned DEF_MEM_W  = 14;
  localparam int unsigned DEF_MEM_I  = 6;
  localparam int unsigned DEF_CALC_W = 14;
  localparam int unsigned DEF_CALC_I = 6;
  localparam int unsigned DEF_OUT_W  = 4;

  // Memory bus
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned LEN_W  = 16;

  // Number of LSTM gates and their order in every 4-wide array
  localparam int unsigned NGATES = 4;
  typedef enum logic [1:0] {
    GATE_F = 2'd0,   // forget gate
    GATE_I = 2'd1,   // input gate
    GATE_Z = 2'd2,   // update (candidate) gate
    GATE_O = 2'd3    // output gate
  } gate_e;

  // Shift a wide exact value right by `shift` fraction bits (left if
  // negative), flooring, then saturate to a signed `w`-bit range.
  function automatic logic signed [63:0] fx_requant(input logic signed [63:0] v,
                                                    input int shift,
                                                    input int w);
    logic signed [63:0] s;
    logic signed [63:0] maxv;
    logic signed [63:0] minv;
    s    = (shift >= 0) ? (v >>> shift) : (v <<< (-shift));
    maxv = (64'sd1 <<< (w - 1)) - 64'sd1;
    minv = -(64'sd1 <<< (w - 1));
    if (s > maxv)      s = maxv;
    else if (s < minv) s = minv;
    return s;
  endfunction

  // True when fx_requant() would clamp (used for statistics only).
  function automatic logic fx_overflows(input logic signed [63:0] v,
                                        input int shift,
                                        input int w);
    logic signed [63:0] s;
    s = (shift >= 0) ? (v >>> shift) : (v <<< (-shift));
    return (s > ((64'sd1 <<< (w - 1)) - 64'sd1)) || (s < -(64'sd1 <<< (w - 1)));
  endfunction

endpackage
