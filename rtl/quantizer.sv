// quantizer: requantization to 8 bits with ReLU and saturation.
//
// The 24-bit sum carries `input_scale + weight_scale` fractional bits; the output
// must carry `output_scale`. With lb = input_scale + weight_scale - output_scale:
//   sum < 0                  -> 0            (ReLU)
//   sum > 2^(lb+7) - 1       -> 0x7F         (saturation to the int8 maximum)
//   otherwise                -> sum >>> lb   (truncation, no rounding)
// The saturation test is done on the unshifted sum, against the maximum aligned
// to its fractional point. A negative lb (more output than input fractional bits)
// is handled by a left shift with the same saturation; that case is this design's
// extension. Purely combinational.
module quantizer
  import conv_pkg::*;
(
  input  logic signed [SUM4_W-1:0] sum4,
  input  logic        [SCL_W-1:0]  output_scale,
  input  logic        [SCL_W-1:0]  input_scale,
  input  logic        [SCL_W-1:0]  weight_scale,
  output logic        [ACT_W-1:0]  q
);
  logic signed [SCL_W+1:0] lb;
  logic        [47:0]      maxv;     // 2^(lb+7) - 1, wide enough for any lb
  logic        [47:0]      mag;
  logic        [47:0]      shifted;

  always_comb begin
    lb  = $signed({2'b00, input_scale}) + $signed({2'b00, weight_scale})
        - $signed({2'b00, output_scale});
    mag = 48'(unsigned'(sum4));
    if (lb >= 0) begin
      maxv    = (lb > 40) ? '1 : ((48'd1 << (lb + 7)) - 48'd1);
      shifted = mag >> lb;
    end else begin
      maxv    = 48'd127 >> (-lb);
      shifted = mag << (-lb);
    end
    if (sum4 < 0)          q = '0;
    else if (mag > maxv)   q = 8'h7F;
    else                   q = shifted[ACT_W-1:0];
  end
endmodule
