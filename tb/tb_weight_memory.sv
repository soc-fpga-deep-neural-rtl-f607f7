// tb_weight_memory: streams a layer's weights in ZXYN order (16 weights per
// 64-bit beat), then reads every (kernel position, channel word, filter group)
// and checks that PE o gets the 8 weights of filter g*N_PE+o, channels 8n..8n+7,
// at that kernel position. Also checks the load rate of one beat per two clocks.
// Runs with 32 channels and 16 PEs.
module tb_weight_memory;
  import conv_pkg::*;
  localparam int NCH = 32, NPE = 16, NW = NCH / 8, NG = NCH / NPE;
  localparam int NBEAT = 9 * NCH * NCH / 16;
  logic clk = 0, rst_n = 0, ld_init = 0, ld_valid = 0, ld_ready, rd_en = 0;
  logic [63:0] ld_data = 0;
  logic [3:0] rd_p = 0;
  logic [$clog2(NW)-1:0] rd_n = 0;
  logic [$clog2(NG)-1:0] rd_g = 0;
  logic [31:0] rd_w [NPE];
  int checks = 0, failures = 0;
  int cyc;

  weight_memory #(.N_CH(NCH), .N_PE(NPE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 4-bit weight of filter f, channel z, kernel (ky,kx)
  function automatic logic [3:0] wv(int f, int z, int ky, int kx);
    return 4'(f * 5 + z * 3 + ky * 7 + kx * 11 + (f >> 2) + (z >> 3));
  endfunction

  initial begin
    int beat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ld_init = 1;
    @(negedge clk);
    ld_init = 0;
    // stream: channel fastest, then kx, ky, filter
    beat = 0;
    cyc = 0;
    for (int f = 0; f < NCH; f++)
      for (int ky = 0; ky < 3; ky++)
        for (int kx = 0; kx < 3; kx++)
          for (int zb = 0; zb < NCH / 16; zb++) begin
            logic [63:0] d;
            for (int i = 0; i < 16; i++) d[4*i +: 4] = wv(f, zb * 16 + i, ky, kx);
            ld_valid = 1; ld_data = d;
            do begin @(negedge clk); cyc++; end while (!(ld_ready_q));
            beat++;
          end
    ld_valid = 0;
    @(negedge clk);
    checks++;
    if (cyc != 2 * NBEAT - 1) begin failures++; $display("load took %0d clocks, exp %0d", cyc, 2 * NBEAT - 1); end
    for (int p = 0; p < 9; p++)
      for (int n = 0; n < NW; n++)
        for (int g = 0; g < NG; g++) begin
          rd_en = 1; rd_p = 4'(p); rd_n = 2'(n); rd_g = 1'(g);
          @(negedge clk);
          rd_en = 0;
          for (int o = 0; o < NPE; o++) begin
            logic [31:0] e;
            for (int i = 0; i < 8; i++) e[4*i +: 4] = wv(g * NPE + o, n * 8 + i, p / 3, p % 3);
            checks++;
            if (rd_w[o] !== e) begin
              failures++;
              if (failures < 10) $display("p%0d n%0d g%0d o%0d got %h exp %h", p, n, g, o, rd_w[o], e);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ready as seen at the clock edge that just passed
  logic ld_ready_q;
  always @(posedge clk) ld_ready_q <= ld_ready;
endmodule
