// tb_sum_tree: adder tree plus aligned bias against a plain sum with the
// reference bias alignment, for right shifts, left shifts and no shift.
module tb_sum_tree;
  import conv_pkg::*;
  import tb_ref_pkg::*;
  logic signed [19:0] acc [8];
  logic signed [7:0]  bias;
  logic [7:0] bias_scale, input_scale, weight_scale;
  logic signed [23:0] sum4;
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0;

  sum_tree dut (.*);

  initial begin
    for (int i = 0; i < 4000; i++) begin
      longint exp;
      int bs, is, ws;
      exp = 0;
      for (int k = 0; k < 8; k++) begin
        longint v;
        v = (i % 5 == 0) ? 294912 : longint'($urandom_range(0, 589824)) - 294912;
        acc[k] = 20'(v);
        exp += v;
      end
      bias = 8'($urandom);
      bs = $urandom_range(0, 12); is = $urandom_range(0, 6); ws = $urandom_range(0, 6);
      bias_scale = 8'(bs); input_scale = 8'(is); weight_scale = 8'(ws);
      if (bs > is + ws) n_right++;
      if (bs < is + ws) n_left++;
      exp = sext(exp + ref_bias_align(longint'(bias), bs, is, ws), 24);
      #1;
      checks++;
      if (longint'(sum4) != exp) begin
        failures++;
        if (failures < 10) $display("sum4=%0d exp=%0d bs=%0d is=%0d ws=%0d", sum4, exp, bs, is, ws);
      end
    end
    checks++;
    if (n_left == 0 || n_right == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
