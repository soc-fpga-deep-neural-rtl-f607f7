// processing_element: computes one output activation (one output channel at one
// x,y position) at a time.
//
// Eight MACs work on eight consecutive input channels of the same x,y position:
// the 64-bit activation word (8 x int8, channel 8n+i in bits 8i+7:8i) and the
// 32-bit weight word (8 x int4, channel 8n+i in bits 4i+3:4i) are split over the
// MACs. After the 9 x 32 MAC steps of a pixel (fewer when kernel positions fall on
// padding) the sum tree adds the MAC results and the aligned bias, and the
// quantizer produces the 8-bit ReLU output.
//
// Timing: `en`/`first`/`last` qualify the words presented in the same cycle. The
// accumulators hold the complete sum one clock after the `last` step; the bias is
// captured on that same edge. The 24-bit sum is registered one clock later and
// the quantized result one clock after that, so `res_valid` pulses two clocks
// after the accumulators complete (three clocks after `last`). A new pixel may
// start on the clock right after `last`. The two output registers are this
// design's pipelining choice.
module processing_element
  import conv_pkg::*;
#(
  parameter int unsigned N_MAC = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic                        first,
  input  logic                        last,
  input  logic [N_MAC*ACT_W-1:0]      act,
  input  logic [N_MAC*WGT_W-1:0]      wgt,
  input  logic signed [BIAS_W-1:0]    bias,
  input  layer_cfg_t                  cfg,
  output logic [ACT_W-1:0]            res,
  output logic                        res_valid
);
  logic signed [ACC_W-1:0]  acc [N_MAC];
  logic signed [BIAS_W-1:0] bias_q;
  logic signed [SUM4_W-1:0] sum4, sum4_q;
  logic [ACT_W-1:0]         q;
  logic                     done_d, sum_v;

  for (genvar i = 0; i < N_MAC; i++) begin : g_mac
    mac u_mac (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .clr  (en && first),
      .a    (act[i*ACT_W +: ACT_W]),
      .w    (wgt[i*WGT_W +: WGT_W]),
      .acc  (acc[i])
    );
  end

  sum_tree #(.N_MAC(N_MAC)) u_tree (
    .acc         (acc),
    .bias        (bias_q),
    .bias_scale  (cfg.bias_scale),
    .input_scale (cfg.input_scale),
    .weight_scale(cfg.weight_scale),
    .sum4        (sum4)
  );

  quantizer u_quant (
    .sum4        (sum4_q),
    .output_scale(cfg.output_scale),
    .input_scale (cfg.input_scale),
    .weight_scale(cfg.weight_scale),
    .q           (q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bias_q    <= '0;
      done_d    <= 1'b0;
      sum4_q    <= '0;
      sum_v     <= 1'b0;
      res       <= '0;
      res_valid <= 1'b0;
    end else begin
      done_d <= en && last;
      if (en && last) bias_q <= bias;
      sum_v <= done_d;
      if (done_d) sum4_q <= sum4;
      res_valid <= sum_v;
      if (sum_v) res <= q;
    end
  end
endmodule
