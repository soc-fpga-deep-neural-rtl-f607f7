// axil_regs: AXI4-Lite slave holding the accelerator's layer configuration.
//
// Register map (32-bit registers, byte addresses):
//   0x00 control: bit 0 start (write 1; reads 1 until the run begins),
//                 bit 1 done (sticky, cleared by the next start),
//                 bit 2 idle
//   0x10 a_x            0x18 a_y
//   0x20 output_scale   0x28 input_scale
//   0x30 weight_scale   0x38 bias_scale
// The configuration fields are the ones the accelerator takes; the offsets and
// the control bits follow the usual layout of a generated accelerator control
// interface and are this design's choice. Writes take address and data in the
// same or different clocks; one write and one read are handled at a time, with
// an OKAY response.
module axil_regs
  import conv_pkg::*;
#(
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // to / from the controller
  output layer_cfg_t        cfg,
  output logic              start,      // one-clock pulse
  input  logic              busy,
  input  logic              done        // one-clock pulse
);
  logic              aw_have, w_have, start_req, done_q;
  logic [ADDR_W-1:0] aw_q;
  logic [31:0]       w_q;

  always_comb begin
    s_awready = !aw_have && !s_bvalid;
    s_wready  = !w_have && !s_bvalid;
    s_bresp   = 2'b00;
    s_rresp   = 2'b00;
    s_arready = !s_rvalid;
    start     = start_req && !busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_have <= 1'b0; w_have <= 1'b0; aw_q <= '0; w_q <= '0;
      s_bvalid <= 1'b0; s_rvalid <= 1'b0; s_rdata <= '0;
      start_req <= 1'b0; done_q <= 1'b0;
      cfg <= '{a_x: 16'd5, a_y: 16'd5, default: '0};
    end else begin
      if (s_awvalid && s_awready) begin aw_have <= 1'b1; aw_q <= s_awaddr; end
      if (s_wvalid && s_wready)   begin w_have  <= 1'b1; w_q  <= s_wdata;  end
      if (aw_have && w_have) begin
        aw_have  <= 1'b0;
        w_have   <= 1'b0;
        s_bvalid <= 1'b1;
        unique case (aw_q[ADDR_W-1:2])
          4'h0: if (w_q[0]) start_req <= 1'b1;
          4'h4: cfg.a_x          <= w_q[DIM_W-1:0];
          4'h6: cfg.a_y          <= w_q[DIM_W-1:0];
          4'h8: cfg.output_scale <= w_q[SCL_W-1:0];
          4'hA: cfg.input_scale  <= w_q[SCL_W-1:0];
          4'hC: cfg.weight_scale <= w_q[SCL_W-1:0];
          4'hE: cfg.bias_scale   <= w_q[SCL_W-1:0];
          default: ;
        endcase
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;

      if (start) begin start_req <= 1'b0; done_q <= 1'b0; end
      if (done)  done_q <= 1'b1;

      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        unique case (s_araddr[ADDR_W-1:2])
          4'h0: s_rdata <= {29'd0, !busy && !start_req, done_q, start_req};
          4'h4: s_rdata <= 32'(cfg.a_x);
          4'h6: s_rdata <= 32'(cfg.a_y);
          4'h8: s_rdata <= 32'(cfg.output_scale);
          4'hA: s_rdata <= 32'(cfg.input_scale);
          4'hC: s_rdata <= 32'(cfg.weight_scale);
          4'hE: s_rdata <= 32'(cfg.bias_scale);
          default: s_rdata <= '0;
        endcase
      end else if (s_rvalid && s_rready) s_rvalid <= 1'b0;
    end
  end
endmodule
