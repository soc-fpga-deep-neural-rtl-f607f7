// sum_tree: adder tree and bias alignment of a processing element.
//
// Adds the eight 20-bit MAC results in three stages (four 21-bit, two 22-bit and
// one 23-bit adder, so nothing overflows), then adds the bias. The bias is an
// 8-bit fixed-point value with `bias_scale` fractional bits while the tree result
// has `input_scale + weight_scale`; a barrel shifter moves the bias right by the
// difference when it is positive and left when it is negative, and the aligned
// value is kept to 23 bits. The final sum is 24 bits.
//
// Purely combinational; the processing element registers its output.
module sum_tree
  import conv_pkg::*;
#(
  parameter int unsigned N_MAC = 8
) (
  input  logic signed [ACC_W-1:0]  acc [N_MAC],
  input  logic signed [BIAS_W-1:0] bias,
  input  logic        [SCL_W-1:0]  bias_scale,
  input  logic        [SCL_W-1:0]  input_scale,
  input  logic        [SCL_W-1:0]  weight_scale,
  output logic signed [SUM4_W-1:0] sum4
);
  logic signed [SUM1_W-1:0] sum1 [4];
  logic signed [SUM2_W-1:0] sum2 [2];
  logic signed [SUM3_W-1:0] sum3;
  logic signed [BALN_W-1:0] bias_aln;
  logic signed [SCL_W+1:0]  shamt;   // bias_scale - (input_scale + weight_scale)
  logic signed [SUM3_W-1:0] tree;

  // For a build with N_MAC other than 8 the tree is a plain reduction of the same
  // final width.
  always_comb begin
    if (N_MAC == 8) begin
      for (int i = 0; i < 4; i++) sum1[i] = SUM1_W'(acc[2*i]) + SUM1_W'(acc[2*i+1]);
      for (int i = 0; i < 2; i++) sum2[i] = SUM2_W'(sum1[2*i]) + SUM2_W'(sum1[2*i+1]);
      sum3 = SUM3_W'(sum2[0]) + SUM3_W'(sum2[1]);
      tree = sum3;
    end else begin
      for (int i = 0; i < 4; i++) sum1[i] = '0;
      for (int i = 0; i < 2; i++) sum2[i] = '0;
      sum3 = '0;
      for (int i = 0; i < N_MAC; i++) sum3 = sum3 + SUM3_W'(acc[i]);
      tree = sum3;
    end
  end

  always_comb begin
    shamt = $signed({2'b00, bias_scale}) - $signed({2'b00, input_scale})
          - $signed({2'b00, weight_scale});
    if (shamt >= 0) bias_aln = BALN_W'(bias) >>> shamt;
    else            bias_aln = BALN_W'(bias) <<< (-shamt);
    sum4 = SUM4_W'(tree) + SUM4_W'(bias_aln);
  end
endmodule
