// conv3d: 3x3 convolution-layer accelerator with 16 processing elements.
//
// Computes one quantized convolution layer of the RetinaNet classification and
// regression heads: 3x3 kernel, stride 1, zero padding 1, N_CH input and N_CH
// output channels, 4-bit weights, 8-bit activations and biases, ReLU, and an
// 8-bit output. The input size a_x x a_y (up to MAX_X columns) and the four
// fixed-point scales are set per layer over AXI-Lite.
//
// Data flow: one 64-bit AXI-Stream input carries, in this order, all weights
// (ZXYN order, 2 clocks per beat), all biases, and then the activations (ZXY
// order, 8 channels per beat, unpadded). Weights and biases are kept entirely
// on chip; activations pass through a sliding-window memory so each is read
// from external memory once. N_PE PEs compute N_PE consecutive output channels
// of the same pixel; the activation word is broadcast to all of them, each PE
// has its own weight and bias port. The PE results are multiplexed one by one
// onto the 8-bit AXI-Stream output, in ZXY order, with TLAST on the last one.
//
// Interface: AXI4-Lite slave for configuration and start/done (see axil_regs),
// 64-bit AXI-Stream sink `s_axis_*` (TLAST accepted and ignored), 8-bit
// AXI-Stream source `m_axis_*`. Single clock, asynchronous active-low reset.
// Architecture and sizes follow the accelerator description; the register map,
// stream framing and pipeline registers are this design's choices.
module conv3d
  import conv_pkg::*;
#(
  parameter int unsigned N_CH  = 256,
  parameter int unsigned N_PE  = 16,
  parameter int unsigned N_MAC = 8,
  parameter int unsigned MAX_X = 80
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite configuration slave
  input  logic [5:0]        s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [5:0]        s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // input stream: weights, bias, activations
  input  logic [BUS_W-1:0]  s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic              s_axis_tlast,
  // output stream: output activations
  output logic [ACT_W-1:0]  m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic              m_axis_tlast
);
  localparam int unsigned NW = N_CH / N_MAC;
  localparam int unsigned NG = N_CH / N_PE;

  layer_cfg_t cfg_reg, cfg;
  logic start, busy, done;
  logic ld_init, wm_ld_valid, wm_ld_ready, bm_wr_en, am_shift;
  logic [BUS_W-1:0] am_din, act_word;
  logic rd_en;
  logic [3:0] rd_p;
  logic [$clog2(NW)-1:0] rd_n;
  logic [$clog2(NG)-1:0] rd_g;
  logic pe_en, pe_first, pe_last;
  logic [31:0] wgt_word [N_PE];
  logic [BIAS_W-1:0] bias_v [N_PE];
  logic [ACT_W-1:0] res [N_PE];
  logic [N_PE-1:0] res_valid;
  logic om_idle, om_load, om_last_grp;
  logic unused_tlast;

  always_comb unused_tlast = s_axis_tlast;

  axil_regs u_regs (
    .clk, .rst_n,
    .s_awaddr(s_axi_awaddr), .s_awvalid(s_axi_awvalid), .s_awready(s_axi_awready),
    .s_wdata(s_axi_wdata), .s_wstrb(s_axi_wstrb), .s_wvalid(s_axi_wvalid),
    .s_wready(s_axi_wready), .s_bresp(s_axi_bresp), .s_bvalid(s_axi_bvalid),
    .s_bready(s_axi_bready), .s_araddr(s_axi_araddr), .s_arvalid(s_axi_arvalid),
    .s_arready(s_axi_arready), .s_rdata(s_axi_rdata), .s_rresp(s_axi_rresp),
    .s_rvalid(s_axi_rvalid), .s_rready(s_axi_rready),
    .cfg(cfg_reg), .start, .busy, .done
  );

  conv_controller #(.N_CH(N_CH), .N_PE(N_PE)) u_ctrl (
    .clk, .rst_n, .start, .cfg_in(cfg_reg), .cfg, .busy, .done,
    .s_tdata(s_axis_tdata), .s_tvalid(s_axis_tvalid), .s_tready(s_axis_tready),
    .ld_init, .wm_ld_valid, .wm_ld_ready, .bm_wr_en, .am_shift, .am_din,
    .rd_en, .rd_p, .rd_n, .rd_g,
    .pe_en, .pe_first, .pe_last, .pe_res_valid(res_valid[0]),
    .om_idle, .om_load, .om_last_grp
  );

  weight_memory #(.N_CH(N_CH), .N_PE(N_PE)) u_wmem (
    .clk, .rst_n, .ld_init, .ld_valid(wm_ld_valid), .ld_ready(wm_ld_ready),
    .ld_data(s_axis_tdata), .rd_en, .rd_p, .rd_n, .rd_g, .rd_w(wgt_word)
  );

  bias_memory #(.N_CH(N_CH), .N_PE(N_PE)) u_bmem (
    .clk, .rst_n, .ld_init, .wr_en(bm_wr_en), .wr_data(s_axis_tdata),
    .rd_en, .rd_g, .rd_bias(bias_v)
  );

  activation_memory #(.N_CH(N_CH), .MAX_X(MAX_X)) u_amem (
    .clk, .rst_n, .init(ld_init), .a_x(cfg.a_x), .shift(am_shift), .din(am_din),
    .rd_en, .rd_p, .rd_n, .rd_word(act_word)
  );

  for (genvar o = 0; o < N_PE; o++) begin : g_pe
    processing_element #(.N_MAC(N_MAC)) u_pe (
      .clk, .rst_n, .en(pe_en), .first(pe_first), .last(pe_last),
      .act(act_word), .wgt(wgt_word[o][N_MAC*WGT_W-1:0]), .bias(bias_v[o]), .cfg,
      .res(res[o]), .res_valid(res_valid[o])
    );
  end

  output_mux #(.N_PE(N_PE)) u_omux (
    .clk, .rst_n, .load(om_load), .vals(res), .last_grp(om_last_grp), .idle(om_idle),
    .m_tdata(m_axis_tdata), .m_tvalid(m_axis_tvalid), .m_tready(m_axis_tready),
    .m_tlast(m_axis_tlast)
  );
endmodule
