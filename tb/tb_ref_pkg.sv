// tb_ref_pkg: reference arithmetic for the testbenches, written from the
// number format (fixed point with a given number of fractional bits) rather
// than from the RTL structure.
package tb_ref_pkg;

  // Sign-extend the low `bits` bits of v.
  function automatic longint sext(longint v, int bits);
    longint m;
    m = longint'(1) << bits;
    v = v & (m - 1);
    if (v >= (m >> 1)) v = v - m;
    return v;
  endfunction

  // Bias moved from `bs` fractional bits to `is+ws` fractional bits, then
  // kept to 23 bits (floor when bits are dropped).
  function automatic longint ref_bias_align(longint bias, int bs, int is, int ws);
    int d;
    longint v;
    d = bs - (is + ws);
    if (d >= 0) begin
      v = bias;
      for (int i = 0; i < d; i++) v = (v >= 0) ? v / 2 : -((-v + 1) / 2);
    end else v = bias * (longint'(1) << (-d));
    return sext(v, 23);
  endfunction

  // ReLU + requantization: value with is+ws fractional bits to os fractional
  // bits, truncated toward minus infinity, saturated to 127.
  function automatic int ref_quant(longint sum, int os, int is, int ws);
    int lb;
    longint v;
    lb = is + ws - os;
    if (sum < 0) return 0;
    if (lb >= 0) v = sum / (longint'(1) << lb);
    else         v = sum * (longint'(1) << (-lb));
    if (v > 127) return 127;
    return int'(v);
  endfunction

endpackage
