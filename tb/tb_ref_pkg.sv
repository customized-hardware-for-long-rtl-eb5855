// tb_ref_pkg: reference arithmetic for the LSTM accelerator testbenches.
//
// These functions restate the accelerator's number rules independently of
// the RTL: fixed-point requantisation is done with real division and floor,
// the PLAN activations from their segment table in real arithmetic, and the
// LFSR from its polynomial. Testbenches compare the RTL against them.
package tb_ref_pkg;

  // floor(v / 2^shift), clamped to a signed w-bit range
  function automatic longint ref_requant(input longint v, input int shift, input int w);
    real    r;
    longint q, mx, mn;
    r  = real'(v) / (2.0 ** shift);
    q  = longint'($floor(r));
    mx = (longint'(1) << (w - 1)) - 1;
    mn = -(longint'(1) << (w - 1));
    if (q > mx) q = mx;
    if (q < mn) q = mn;
    return q;
  endfunction

  // PLAN sigmoid on an integer with f fraction bits
  function automatic longint ref_plan_sig(input longint x, input int f);
    real    a, slope, bias, y;
    longint part;
    a = (x < 0 ? -real'(x) : real'(x)) / (2.0 ** f);
    if (a >= 5.0)        begin slope = 0.0;     bias = 1.0;     end
    else if (a >= 2.375) begin slope = 0.03125; bias = 0.84375; end
    else if (a >= 1.0)   begin slope = 0.125;   bias = 0.625;   end
    else                 begin slope = 0.25;    bias = 0.5;     end
    part = longint'($floor(a * slope * (2.0 ** f)));
    y    = real'(part) + bias * (2.0 ** f);
    if (x < 0) y = (2.0 ** f) - y;
    return longint'(y);
  endfunction

  function automatic longint ref_plan_tanh(input longint x, input int f);
    return 2 * ref_plan_sig(2 * x, f) - (longint'(1) << f);
  endfunction

  function automatic logic [15:0] ref_lfsr_next(input logic [15:0] s);
    // x^16 + x^15 + x^13 + x^4 + 1
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction

  // mean of four LFSR words read as signed 16-bit numbers, floored
  function automatic longint ref_gauss(input logic [3:0][15:0] s);
    longint sum;
    sum = 0;
    for (int n = 0; n < 4; n++) sum += longint'($signed(s[n]));
    return longint'($floor(real'(sum) / 4.0));
  endfunction

  // One LSTM element: pre-activations (Calc format, cf fraction bits) and the
  // previous cell value (Hidden format, hf fraction bits) give the new cell
  // and hidden values, each floored and clamped into the Hidden format.
  function automatic void ref_cell(input longint pf, input longint pi, input longint pz,
                                   input longint po, input longint c_prev,
                                   input int cf, input int hf, input int hw,
                                   output longint c_new, output longint h_new);
    longint f, i, z, o, tc;
    int     fp;
    f  = ref_plan_sig(pf, cf);
    i  = ref_plan_sig(pi, cf);
    z  = ref_plan_tanh(pz, cf);
    o  = ref_plan_sig(po, cf);
    fp = (cf + hf > 2 * cf) ? cf + hf : 2 * cf;
    c_new = ref_requant(f * c_prev * (longint'(1) << (fp - cf - hf)) +
                        i * z * (longint'(1) << (fp - 2 * cf)), fp - hf, hw);
    tc    = ref_plan_tanh(c_new, hf);
    h_new = ref_requant(o * tc, cf, hw);
  endfunction

endpackage
