// tb_quantizer: compares the quantizer with the reference requantization
// (ReLU, floor shift, saturation at 127) over random sums and scales, with
// extra values on the saturation boundary.
module tb_quantizer;
  import conv_pkg::*;
  import tb_ref_pkg::*;
  logic signed [23:0] sum4;
  logic [7:0] output_scale, input_scale, weight_scale;
  logic [7:0] q;
  int checks = 0, failures = 0;

  quantizer dut (.*);

  task automatic check(longint s, int os, int is, int ws);
    int exp;
    sum4 = 24'(s); output_scale = 8'(os); input_scale = 8'(is); weight_scale = 8'(ws);
    #1;
    exp = ref_quant(sext(s, 24), os, is, ws);
    checks++;
    if (int'(q) != exp) begin
      failures++;
      $display("sum=%0d os=%0d is=%0d ws=%0d q=%0d exp=%0d", sext(s, 24), os, is, ws, q, exp);
    end
  endtask

  initial begin
    // the scales of the accelerated head layers: os 4, is 4, ws 6
    for (int lb = 0; lb <= 12; lb++) begin
      longint m;
      m = (longint'(1) << (lb + 7));
      check(m - 1, 4, 4 + lb - 6 + 6, 6 - 6 + 0);  // just below saturation
      check(m, 4, 4 + lb, 0);
      check(m - 1, 4, 4 + lb, 0);
      check(-1, 4, 4 + lb, 0);
    end
    for (int i = 0; i < 3000; i++) begin
      int os, is, ws;
      os = $urandom_range(0, 8); is = $urandom_range(0, 8); ws = $urandom_range(0, 8);
      check(longint'($urandom_range(0, 32'h00FF_FFFF)), os, is, ws);
      check(longint'($urandom_range(0, 4000)), os, is, ws);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
