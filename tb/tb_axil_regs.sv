// tb_axil_regs: AXI-Lite writes and read-back of every configuration register,
// address and data in separate clocks, the start pulse (held off while busy),
// and the done/idle bits of the control register.
module tb_axil_regs;
  import conv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [5:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 1, s_arvalid = 0, s_rready = 1;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [3:0] s_wstrb = 4'hF;
  logic [1:0] s_bresp, s_rresp;
  layer_cfg_t cfg;
  logic start, busy = 0, done = 0;
  int checks = 0, failures = 0, starts = 0;

  axil_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d, bit split);
    s_awaddr = 6'(a); s_awvalid = 1;
    if (!split) begin s_wdata = d; s_wvalid = 1; end
    do @(negedge clk); while (!aw_ok);
    s_awvalid = 0;
    if (split) begin
      s_wdata = d; s_wvalid = 1;
      do @(negedge clk); while (!w_ok);
    end else if (!w_ok) do @(negedge clk); while (!w_ok);
    s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic rd(int a, output int d);
    s_araddr = 6'(a); s_arvalid = 1;
    @(negedge clk);
    s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(negedge clk);
  endtask

  logic aw_ok, w_ok;
  always @(posedge clk) begin
    aw_ok <= s_awvalid && s_awready;
    w_ok  <= s_wvalid && s_wready;
  end

  initial begin
    int vals[6] = '{80, 40, 4, 4, 6, 8};
    int v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 6; i++) wr(16 + 8 * i, vals[i], i % 2);
    for (int i = 0; i < 6; i++) begin
      rd(16 + 8 * i, v);
      checks++;
      if (v != vals[i]) begin failures++; $display("reg %0d read %0d", i, v); end
    end
    checks++;
    if (cfg.a_x != 80 || cfg.a_y != 40 || cfg.output_scale != 4 || cfg.input_scale != 4 ||
        cfg.weight_scale != 6 || cfg.bias_scale != 8) begin failures++; $display("cfg wrong"); end
    rd(0, v);
    checks++;
    if (v != 4) begin failures++; $display("ctrl idle read %0d", v); end
    // start while busy is held off
    busy = 1;
    wr(0, 1, 0);
    repeat (3) @(negedge clk);
    checks++;
    if (starts != 0) begin failures++; $display("start while busy"); end
    busy = 0;
    @(negedge clk);
    checks++;
    if (starts != 1) begin failures++; $display("starts=%0d", starts); end
    busy = 1;
    repeat (5) @(negedge clk);
    done = 1;
    @(negedge clk);
    done = 0; busy = 0;
    rd(0, v);
    checks++;
    if (v != 6) begin failures++; $display("ctrl after done %0d", v); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
