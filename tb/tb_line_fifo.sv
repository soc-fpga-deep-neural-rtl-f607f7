// tb_line_fifo: the FIFO must return each word exactly `len` shifts after it
// was pushed, for several lengths set at run time, with idle clocks in between.
module tb_line_fifo;
  logic clk = 0, rst_n = 0, init = 0, shift = 0;
  logic [$clog2(65)-1:0] len = 0;
  logic [15:0] din = 0, dout;
  int checks = 0, failures = 0;
  logic [15:0] hist[$];

  line_fifo #(.WIDTH(16), .DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens[4] = '{7, 64, 2, 33};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (lens[li]) begin
      len <= 7'(lens[li]);
      init <= 1;
      @(posedge clk);
      init <= 0;
      hist.delete();
      for (int i = 0; i < 300; i++) begin
        logic [15:0] v;
        if ($urandom_range(0, 3) == 0) @(posedge clk);   // idle clock
        v = 16'($urandom);
        #1;
        if (hist.size() >= lens[li]) begin
          checks++;
          if (dout != hist[hist.size() - lens[li]]) begin
            failures++;
            $display("len %0d step %0d dout=%h exp=%h", lens[li], i, dout, hist[hist.size() - lens[li]]);
          end
        end
        shift <= 1; din <= v;
        @(posedge clk);
        shift <= 0;
        hist.push_back(v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
