// tb_activation_memory: loads a padded feature map into the window memory in
// the accelerator's order (2*(a_x+2)+3 positions first, then one position per
// output pixel and three at a row change) and, at every output pixel, reads all
// 9 kernel positions x channel words and compares them with the padded image.
// Runs with 16 channels (2 words per position) and two widths.
module tb_activation_memory;
  import conv_pkg::*;
  localparam int NCH = 16, NW = NCH / 8, MAXX = 8;
  logic clk = 0, rst_n = 0, init = 0, shift = 0, rd_en = 0;
  logic [15:0] a_x = 0;
  logic [63:0] din = 0, rd_word;
  logic [3:0] rd_p = 0;
  logic [$clog2(NW)-1:0] rd_n = 0;
  int checks = 0, failures = 0;
  int W, AX, AY, lpos;

  activation_memory #(.N_CH(NCH), .MAX_X(MAXX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // content of word n at padded position (px,py)
  function automatic logic [63:0] img(int px, int py, int n);
    if (px < 1 || px > AX || py < 1 || py > AY) return '0;
    return {16'(px), 16'(py), 16'(n), 16'hA5A5 ^ 16'(px * 7 + py * 13 + n)};
  endfunction

  task automatic load_pos();
    int px, py;
    px = lpos % W; py = lpos / W;
    for (int n = 0; n < NW; n++) begin
      shift = 1; din = img(px, py, n);
      @(negedge clk);
      shift = 0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    lpos++;
  endtask

  task automatic check_window(int ox, int oy);
    for (int p = 0; p < 9; p++)
      for (int n = 0; n < NW; n++) begin
        rd_en = 1; rd_p = 4'(p); rd_n = 1'(n);
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (rd_word !== img(ox + p % 3, oy + p / 3, n)) begin
          failures++;
          $display("out (%0d,%0d) p%0d n%0d got %h exp %h", ox, oy, p, n, rd_word,
                   img(ox + p % 3, oy + p / 3, n));
        end
      end
  endtask

  initial begin
    int dims[2][2] = '{'{5, 4}, '{8, 3}};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (dims[d]) begin
      AX = dims[d][0]; AY = dims[d][1]; W = AX + 2; lpos = 0;
      a_x = 16'(AX);
      init = 1;
      @(negedge clk);
      init = 0;
      repeat (2 * W + 3) load_pos();
      for (int oy = 0; oy < AY; oy++)
        for (int ox = 0; ox < AX; ox++) begin
          check_window(ox, oy);
          if (ox == AX - 1) repeat (3) load_pos();
          else load_pos();
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
