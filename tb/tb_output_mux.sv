// tb_output_mux: loads groups of 16 results and receives them over the output
// stream with random back-pressure; checks order (PE 0 first), TLAST only on
// the last value of a group flagged as last, `idle`, and one beat per clock
// when the receiver is always ready.
module tb_output_mux;
  import conv_pkg::*;
  localparam int NPE = 16;
  logic clk = 0, rst_n = 0, load = 0, last_grp = 0, idle;
  logic [7:0] vals [NPE];
  logic [7:0] m_tdata;
  logic m_tvalid, m_tready = 0, m_tlast;
  int checks = 0, failures = 0;
  int exp_d[$];
  bit exp_l[$];
  bit random_ready = 1;
  int beats = 0;

  output_mux #(.N_PE(NPE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_tready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    beats++;
    checks++;
    if (exp_d.size() == 0) begin failures++; $display("unexpected beat"); end
    else begin
      int d;
      bit l;
      d = exp_d.pop_front();
      l = exp_l.pop_front();
      if (int'(m_tdata) != d || m_tlast != l) begin
        failures++;
        $display("got %0d/%b exp %0d/%b", m_tdata, m_tlast, d, l);
      end
    end
  end

  task automatic send(bit lst);
    while (!idle) @(negedge clk);
    foreach (vals[i]) begin
      vals[i] = 8'($urandom);
      exp_d.push_back(int'(vals[i]));
      exp_l.push_back(lst && i == NPE - 1);
    end
    load = 1; last_grp = lst;
    @(negedge clk);
    load = 0;
    checks++;
    if (idle) begin failures++; $display("idle right after load"); end
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) send(i % 7 == 6);
    while (!idle) @(negedge clk);
    // full rate: 16 beats in 16 clocks
    random_ready = 0;
    @(negedge clk);
    t0 = beats;
    send(1);
    repeat (NPE) @(negedge clk);
    checks++;
    if (beats - t0 != NPE || !idle) begin failures++; $display("rate: %0d beats", beats - t0); end
    checks++;
    if (exp_d.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
