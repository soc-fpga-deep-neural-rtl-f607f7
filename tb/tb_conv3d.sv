// tb_conv3d: end-to-end test of the accelerator at reduced size (32 channels,
// 16 PEs, rows up to 8 pixels) over five layers of different shapes and
// scales, down to the narrowest input of 2 pixels, run back to back. For each
// layer it configures the registers over AXI-Lite, starts the run, streams
// weights (ZXYN), biases and activations (ZXY) with random gaps, receives the
// output with random back-pressure and compares every output activation with
// a reference convolution (3x3, padding 1, bias alignment, ReLU,
// requantization). It also counts that each mechanism of the
// design happened: skipped padding kernel positions, padding words inserted
// without reading the stream, the three-position load at a row change, the
// output back-pressure stall, input stream gaps, bias shifted left and right,
// ReLU clipping and saturation.
module tb_conv3d;
  import conv_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCH = 32, NPE = 16, MAXX = 8;
  localparam int NW = NCH / 8, NG = NCH / NPE;

  logic clk = 0, rst_n = 0;
  logic [5:0]  s_axi_awaddr = 0, s_axi_araddr = 0;
  logic        s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 1;
  logic        s_axi_arvalid = 0, s_axi_rready = 1;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0]  s_axi_wstrb = 4'hF;
  logic        s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic [63:0] s_axis_tdata = 0;
  logic        s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic [7:0]  m_axis_tdata;
  logic        m_axis_tvalid, m_axis_tready = 0, m_axis_tlast;

  conv3d #(.N_CH(NCH), .N_PE(NPE), .N_MAC(8), .MAX_X(MAXX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- streams
  logic [63:0] inq[$];
  bit in_gaps = 1, out_bp = 1;
  logic [8:0] outq[$];

  always @(negedge clk) begin
    if (!(s_axis_tvalid && !taken)) begin
      if (inq.size() > 0 && (!in_gaps || $urandom_range(0, 4) != 0)) begin
        s_axis_tvalid = 1; s_axis_tdata = inq[0];
      end else s_axis_tvalid = 0;
    end
    m_axis_tready = out_bp ? ($urandom_range(0, 3) != 0) : 1'b1;
  end
  bit taken = 1;
  always @(posedge clk) begin
    taken <= 0;
    if (s_axis_tvalid && s_axis_tready) begin void'(inq.pop_front()); taken <= 1; end
    if (m_axis_tvalid && m_axis_tready) outq.push_back({m_axis_tlast, m_axis_tdata});
  end

  // ---------------------------------------------------------------- events
  int ev_skip = 0, ev_padword = 0, ev_rowload = 0, ev_stall = 0, ev_gap = 0;
  int ev_mac = 0, ev_relu = 0, ev_sat = 0, ev_bleft = 0, ev_bright = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.state == S_MAC && dut.u_ctrl.issue && dut.u_ctrl.n == '1 &&
        dut.u_ctrl.p_next > dut.u_ctrl.p + 1) ev_skip++;
    if (dut.u_ctrl.am_shift && !dut.s_axis_tready) ev_padword++;
    if (dut.u_ctrl.state == S_MAC && dut.u_ctrl.issue && dut.u_ctrl.is_last &&
        dut.u_ctrl.g == '1 && dut.u_ctrl.ox == 16'(cur_ax - 1)) ev_rowload++;
    if (dut.u_ctrl.state == S_MAC && dut.u_ctrl.stall) ev_stall++;
    if (dut.s_axis_tready && !s_axis_tvalid && inq.size() == 0 &&
        dut.u_ctrl.state != S_IDLE) ;
    else if (dut.s_axis_tready && !s_axis_tvalid) ev_gap++;
    if (dut.u_ctrl.pe_en) ev_mac++;
    if (dut.u_ctrl.start) t_start = cycle;
    if (dut.u_ctrl.done)  t_done = cycle;
    if (dut.u_ctrl.state == S_WLOAD) n_wload++;
    if (dut.u_ctrl.state == S_BLOAD) n_bload++;
  end
  int t_start = 0, t_done = 0, n_wload = 0, n_bload = 0;

  // ---------------------------------------------------------------- AXI-Lite
  task automatic axil_write(int a, int d);
    bit aw_done = 0, w_done = 0;
    s_axi_awaddr = 6'(a); s_axi_awvalid = 1; s_axi_wdata = d; s_axi_wvalid = 1;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (s_axi_awready) aw_done = 1;
      if (s_axi_wready)  w_done = 1;
      @(negedge clk);
      if (aw_done) s_axi_awvalid = 0;
      if (w_done)  s_axi_wvalid = 0;
    end
    while (!s_axi_bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic axil_read(int a, output int d);
    s_axi_araddr = 6'(a); s_axi_arvalid = 1;
    @(negedge clk);
    s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(negedge clk);
    d = s_axi_rdata;
    @(negedge clk);
  endtask

  // ---------------------------------------------------------------- one layer
  int cur_ax = 5;

  task automatic run_layer(int ax, int ay, int os, int is, int ws, int bs, bit gaps, bit bp);
    int wt[], bi[], act[], exp_o[];
    int ctl, nout, mac_before, exp_mac, exp_cyc;
    cur_ax = ax;
    in_gaps = gaps; out_bp = bp;
    wt = new[NCH * NCH * 9];
    bi = new[NCH];
    act = new[ax * ay * NCH];
    foreach (wt[i])  wt[i] = int'($urandom_range(0, 15)) - 8;
    foreach (bi[i])  bi[i] = int'($urandom_range(0, 255)) - 128;
    foreach (act[i]) act[i] = int'($urandom_range(0, 255)) - 128;
    if (bs > is + ws) ev_bright++;
    if (bs < is + ws) ev_bleft++;

    // reference: out[y][x][f]
    exp_o = new[ax * ay * NCH];
    exp_mac = 0;
    for (int y = 0; y < ay; y++)
      for (int x = 0; x < ax; x++) begin
        for (int ky = 0; ky < 3; ky++)
          for (int kx = 0; kx < 3; kx++)
            if (y + ky - 1 >= 0 && y + ky - 1 < ay && x + kx - 1 >= 0 && x + kx - 1 < ax)
              exp_mac += NG * NW;
        for (int f = 0; f < NCH; f++) begin
          longint s;
          int lb;
          s = 0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++) begin
              int iy, ix;
              iy = y + ky - 1; ix = x + kx - 1;
              if (iy >= 0 && iy < ay && ix >= 0 && ix < ax)
                for (int z = 0; z < NCH; z++)
                  s += longint'(wt[((f * 3 + ky) * 3 + kx) * NCH + z]) *
                       longint'(act[(iy * ax + ix) * NCH + z]);
            end
          s = sext(s + ref_bias_align(bi[f], bs, is, ws), 24);
          lb = is + ws - os;
          if (s < 0) ev_relu++;
          else if (s > (longint'(1) << (lb + 7)) - 1) ev_sat++;
          exp_o[(y * ax + x) * NCH + f] = ref_quant(s, os, is, ws);
        end
      end

    axil_write(16'h10, ax);
    axil_write(16'h18, ay);
    axil_write(16'h20, os);
    axil_write(16'h28, is);
    axil_write(16'h30, ws);
    axil_write(16'h38, bs);
    axil_write(16'h00, 1);
    mac_before = ev_mac;
    n_wload = 0; n_bload = 0;

    // weights: ZXYN (channels fastest, then kx, ky, filter), 16 per beat
    for (int f = 0; f < NCH; f++)
      for (int ky = 0; ky < 3; ky++)
        for (int kx = 0; kx < 3; kx++)
          for (int zb = 0; zb < NCH / 16; zb++) begin
            logic [63:0] d;
            for (int i = 0; i < 16; i++) d[4*i +: 4] = 4'(wt[((f * 3 + ky) * 3 + kx) * NCH + zb * 16 + i]);
            inq.push_back(d);
          end
    for (int m = 0; m < NCH / 8; m++) begin
      logic [63:0] d;
      for (int i = 0; i < 8; i++) d[8*i +: 8] = 8'(bi[8 * m + i]);
      inq.push_back(d);
    end
    for (int pix = 0; pix < ax * ay; pix++)
      for (int m = 0; m < NW; m++) begin
        logic [63:0] d;
        for (int i = 0; i < 8; i++) d[8*i +: 8] = 8'(act[pix * NCH + 8 * m + i]);
        inq.push_back(d);
      end

    do axil_read(0, ctl); while (!ctl[1]);

    checks++;
    if (inq.size() != 0) begin failures++; $display("%0d input beats not consumed", inq.size()); end
    nout = ax * ay * NCH;
    checks++;
    if (outq.size() != nout) begin failures++; $display("got %0d outputs, exp %0d", outq.size(), nout); end
    for (int i = 0; i < nout && outq.size() > 0; i++) begin
      logic [8:0] o;
      o = outq.pop_front();
      checks++;
      if (int'(o[7:0]) != exp_o[i] || o[8] != (i == nout - 1)) begin
        failures++;
        if (failures < 20) $display("layer %0dx%0d out %0d: got %0d last %b, exp %0d", ax, ay, i, o[7:0], o[8], exp_o[i]);
      end
    end
    outq.delete();
    // Schedule with no stream gaps and no back-pressure: 2 clocks per weight
    // beat, 1 per bias and activation word, 1 per MAC step, 3 positions loaded
    // at a row change, and a fixed drain of the PE pipeline and output stream.
    if (!gaps && !bp && NW * 4 >= 21) begin
      exp_cyc = 2 * (9 * NCH * NCH / 16) - 1 + NCH / 8 + (2 * (ax + 2) + 3) * NW + exp_mac
              + (ax * ay - 1) * NW + (ay - 1) * 2 * NW + 7 + NPE;
      checks++;
      if (t_done - t_start != exp_cyc) begin
        failures++;
        $display("layer took %0d clocks, expected %0d", t_done - t_start, exp_cyc);
      end
      checks++;
      if (n_wload != 2 * (9 * NCH * NCH / 16) - 1 || n_bload != NCH / 8) begin
        failures++;
        $display("weight load %0d clocks, bias load %0d clocks", n_wload, n_bload);
      end
      $display("layer %0dx%0d: %0d clocks from start to done", ax, ay, t_done - t_start);
    end
    checks++;
    if (ev_mac - mac_before != exp_mac) begin
      failures++;
      $display("MAC steps %0d, expected %0d (one per non-padding kernel position)", ev_mac - mac_before, exp_mac);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_layer(5, 4, 4, 4, 6, 8, 1, 1);   // bias shifted left by 2
    run_layer(8, 3, 2, 3, 2, 7, 1, 0);   // full row width, bias shifted right by 2
    run_layer(3, 2, 5, 4, 3, 7, 0, 1);
    run_layer(2, 3, 4, 4, 6, 8, 0, 0);   // narrowest input (line FIFOs one position long)
    run_layer(2, 1, 4, 4, 6, 8, 1, 1);   // a single row
    $display("mechanism counts:");
    need("padding kernel positions skipped", ev_skip);
    need("padding words inserted", ev_padword);
    need("row-change three-position loads", ev_rowload);
    need("output back-pressure stalls", ev_stall);
    need("input stream gaps", ev_gap);
    need("bias shifted right", ev_bright);
    need("bias shifted left", ev_bleft);
    need("ReLU clipped outputs", ev_relu);
    need("saturated outputs", ev_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
