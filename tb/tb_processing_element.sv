// tb_processing_element: feeds a PE the steps of several output pixels (full
// 288-step pixels and shorter ones, as when padding positions are skipped),
// back to back, and compares each result with a reference dot product, bias
// alignment and requantization. Also checks the 3-clock result latency.
module tb_processing_element;
  import conv_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, first = 0, last = 0;
  logic [63:0] act = 0;
  logic [31:0] wgt = 0;
  logic signed [7:0] bias = 0;
  layer_cfg_t cfg;
  logic [7:0] res;
  logic res_valid;
  int checks = 0, failures = 0;
  int exp_q[$];
  int cycle = 0;
  int last_q[$];

  processing_element dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (en && last) last_q.push_back(cycle);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && res_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      int e;
      e = exp_q.pop_front();
      if (int'(res) != e) begin failures++; $display("res=%0d exp=%0d", res, e); end
    end
    checks++;
    begin
      int lc;
      lc = last_q.pop_front();
      if (cycle - lc != 3) begin failures++; $display("latency %0d", cycle - lc); end
    end
  end

  task automatic pixel(int steps, int amax);
    longint dot;
    int b;
    dot = 0;
    b = int'($urandom_range(0, 255)) - 128;
    for (int s = 0; s < steps; s++) begin
      logic [63:0] av;
      logic [31:0] wv;
      av = {$urandom, $urandom};
      wv = $urandom;
      for (int k = 0; k < 8; k++) begin
        int a8, w4;
        a8 = int'($signed(av[8*k +: 8]));
        if (a8 > amax) begin a8 = amax; av[8*k +: 8] = 8'(amax); end
        w4 = int'($signed(wv[4*k +: 4]));
        dot += a8 * w4;
      end
      en = 1; first = (s == 0); last = (s == steps - 1);
      act = av; wgt = wv; bias = 8'(b);
      @(negedge clk);
    end
    en = 0; first = 0; last = 0;
    exp_q.push_back(ref_quant(sext(dot + ref_bias_align(b, int'(cfg.bias_scale),
        int'(cfg.input_scale), int'(cfg.weight_scale)), 24),
        int'(cfg.output_scale), int'(cfg.input_scale), int'(cfg.weight_scale)));
  endtask

  initial begin
    cfg = '{a_x: 16'd5, a_y: 16'd5, output_scale: 8'd4, input_scale: 8'd4,
            weight_scale: 8'd6, bias_scale: 8'd8};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    pixel(288, 127);
    pixel(288, 20);
    pixel(128, 127);
    pixel(192, 10);
    pixel(5, 127);
    repeat (4) @(negedge clk);
    cfg.output_scale = 8'd8; cfg.bias_scale = 8'd12;   // small shift, right bias shift
    for (int i = 0; i < 20; i++) pixel($urandom_range(1, 64), $urandom_range(2, 127));
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
