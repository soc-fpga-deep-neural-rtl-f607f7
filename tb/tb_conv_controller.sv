// tb_conv_controller: runs the controller alone on a small layer (32 channels,
// 16 PEs, 4x3 pixels) with a stand-in stream, PEs and output multiplexer. It
// checks the phase lengths of the loads, the exact sequence of memory reads
// (every output pixel, channel group, non-padding kernel position and channel
// word, in loop order), the first/last flags one clock later, the number of
// window shifts and of padding words, and that the last step of a group waits
// while the output multiplexer is busy.
module tb_conv_controller;
  import conv_pkg::*;
  localparam int NCH = 32, NPE = 16, NW = NCH / 8, NG = NCH / NPE;
  localparam int AX = 4, AY = 3;
  logic clk = 0, rst_n = 0, start = 0;
  layer_cfg_t cfg_in, cfg;
  logic busy, done;
  logic [63:0] s_tdata = 0;
  logic s_tvalid = 0, s_tready;
  logic ld_init, wm_ld_valid, wm_ld_ready = 1, bm_wr_en, am_shift;
  logic [63:0] am_din;
  logic rd_en;
  logic [3:0] rd_p;
  logic [$clog2(NW)-1:0] rd_n;
  logic [$clog2(NG)-1:0] rd_g;
  logic pe_en, pe_first, pe_last, pe_res_valid;
  logic om_idle, om_load, om_last_grp;
  int checks = 0, failures = 0;

  conv_controller #(.N_CH(NCH), .N_PE(NPE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-ins: weight memory takes a beat every other clock, PEs answer three
  // clocks after the last step, the output multiplexer stays busy for a while
  logic [2:0] pe_pipe;
  int om_busy;
  bit wm_half;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin pe_pipe <= 0; om_busy <= 0; wm_half <= 0; end
    else begin
      pe_pipe <= {pe_pipe[1:0], pe_en && pe_last};
      if (om_load) om_busy <= 30;
      else if (om_busy > 0) om_busy <= om_busy - 1;
      wm_half <= wm_half ? 1'b0 : (wm_ld_valid && wm_ld_ready);
    end
  always_comb begin
    pe_res_valid = pe_pipe[2];
    om_idle = (om_busy == 0);
    wm_ld_ready = !wm_half;
  end

  // the stream is always valid
  always_comb s_tvalid = busy;

  // expected read sequence
  typedef struct { int p, n, g; bit first, last; } step_t;
  step_t exp_q[$];
  step_t pend_flags[$];
  int n_w = 0, n_b = 0, n_shift = 0, n_pad = 0, n_stall = 0, n_done = 0, n_lastgrp = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.state == S_WLOAD && s_tvalid && s_tready) n_w++;
    if (dut.state == S_BLOAD && s_tvalid && s_tready) n_b++;
    if (am_shift) n_shift++;
    if (am_shift && !s_tready) n_pad++;
    if (done) n_done++;
    if (om_load && om_last_grp) n_lastgrp++;
    if (dut.state == S_MAC && !rd_en) begin
      n_stall++;
      checks++;
      if (om_idle && !dut.pend) begin failures++; $display("stall without cause"); end
    end
    if (rd_en) begin
      step_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("extra read"); end
      else begin
        e = exp_q.pop_front();
        if (int'(rd_p) != e.p || int'(rd_n) != e.n || int'(rd_g) != e.g) begin
          failures++;
          if (failures < 10) $display("read p%0d n%0d g%0d, exp p%0d n%0d g%0d", rd_p, rd_n, rd_g, e.p, e.n, e.g);
        end
        if (e.last && !om_idle) begin failures++; $display("last step issued while output busy"); end
        pend_flags.push_back(e);
      end
    end
    if (pe_en) begin
      step_t e;
      e = pend_flags.pop_front();
      checks++;
      if (pe_first != e.first || pe_last != e.last) begin failures++; $display("flags wrong"); end
    end
  end

  initial begin
    int W;
    W = AX + 2;
    for (int y = 0; y < AY; y++)
      for (int x = 0; x < AX; x++)
        for (int g = 0; g < NG; g++) begin
          int ps[$];
          ps.delete();
          for (int p = 0; p < 9; p++)
            if (x + p % 3 - 1 >= 0 && x + p % 3 - 1 < AX && y + p / 3 - 1 >= 0 && y + p / 3 - 1 < AY)
              ps.push_back(p);
          foreach (ps[i])
            for (int n = 0; n < NW; n++)
              exp_q.push_back('{ps[i], n, g, (i == 0 && n == 0), (i == ps.size() - 1 && n == NW - 1)});
        end
    cfg_in = '{a_x: 16'(AX), a_y: 16'(AY), output_scale: 8'd4, input_scale: 8'd4,
               weight_scale: 8'd6, bias_scale: 8'd8};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++; if (n_w != 9 * NCH * NCH / 16) begin failures++; $display("weight beats %0d", n_w); end
    checks++; if (n_b != NCH / 8) begin failures++; $display("bias beats %0d", n_b); end
    checks++; if (exp_q.size() != 0) begin failures++; $display("%0d reads missing", exp_q.size()); end
    // shifts: initial 2W+3 positions, then 1 per pixel and 3 per row change, none after the last
    checks++;
    if (n_shift != NW * ((2 * W + 3) + (AX * AY - 1) + 2 * (AY - 1))) begin
      failures++; $display("shifts %0d", n_shift);
    end
    checks++;
    if (n_shift - n_pad != NW * AX * AY) begin failures++; $display("stream words %0d", n_shift - n_pad); end
    checks++; if (n_stall == 0) begin failures++; $display("no stall seen"); end
    checks++; if (n_done != 1 || n_lastgrp != 1) begin failures++; $display("done %0d lastgrp %0d", n_done, n_lastgrp); end
    checks++; if (cfg != cfg_in) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
