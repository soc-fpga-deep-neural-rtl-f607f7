// tb_bias_memory: loads 256 biases as 32 beats and reads back every group of
// 16, checking that PE o gets the bias of filter g*16+o one clock after the read.
module tb_bias_memory;
  import conv_pkg::*;
  localparam int NCH = 256, NPE = 16, NG = NCH / NPE;
  logic clk = 0, rst_n = 0, ld_init = 0, wr_en = 0, rd_en = 0;
  logic [63:0] wr_data = 0;
  logic [$clog2(NG)-1:0] rd_g = 0;
  logic [7:0] rd_bias [NPE];
  logic [7:0] b [NCH];
  int checks = 0, failures = 0;

  bias_memory #(.N_CH(NCH), .N_PE(NPE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (b[i]) b[i] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    ld_init = 1;
    @(negedge clk);
    ld_init = 0;
    for (int m = 0; m < NCH / 8; m++) begin
      for (int i = 0; i < 8; i++) wr_data[8*i +: 8] = b[8*m + i];
      wr_en = 1;
      @(negedge clk);
      wr_en = 0;
      if (m % 3 == 0) @(negedge clk);
    end
    for (int r = 0; r < 2 * NG; r++) begin
      int g;
      g = (r < NG) ? r : int'($urandom_range(0, NG - 1));
      rd_en = 1; rd_g = 4'(g);
      @(negedge clk);
      rd_en = 0;
      for (int o = 0; o < NPE; o++) begin
        checks++;
        if (rd_bias[o] !== b[g * NPE + o]) begin
          failures++;
          $display("g%0d o%0d got %h exp %h", g, o, rd_bias[o], b[g * NPE + o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
