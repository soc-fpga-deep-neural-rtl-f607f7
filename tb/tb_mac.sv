// tb_mac: checks the MAC against a running sum, including the worst-case
// 288-step accumulation of -128 * -8 that sizes the 20-bit accumulator, and the
// one-clock result latency.
module tb_mac;
  import conv_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic signed [7:0] a = 0;
  logic signed [3:0] w = 0;
  logic signed [19:0] acc;
  int checks = 0, failures = 0;
  longint model;

  mac dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit e, bit c, int av, int wv);
    en <= e; clr <= c; a <= 8'(av); w <= 4'(wv);
    @(posedge clk);
    if (c) model = 0;
    if (e) model += av * wv;
    #1;
    checks++;
    if (longint'(acc) != model) begin
      failures++;
      $display("mismatch: acc=%0d model=%0d", acc, model);
    end
  endtask

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // worst case: 288 products of -128 * -8
    step(1, 1, -128, -8);
    for (int i = 1; i < 288; i++) step(1, 0, -128, -8);
    checks++;
    if (acc != 20'sd294912) begin failures++; $display("worst case %0d", acc); end
    // random sequences with clears and idle cycles
    for (int i = 0; i < 600; i++) begin
      int av, wv;
      av = int'($urandom_range(0, 255)) - 128;
      wv = int'($urandom_range(0, 15)) - 8;
      step(($urandom_range(0, 3) != 0), ($urandom_range(0, 40) == 0), av, wv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
