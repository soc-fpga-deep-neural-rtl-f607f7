// bias_memory: the N_CH 8-bit biases of one layer.
//
// Loaded from the input stream as N_CH/8 64-bit beats (bias of filter 8m+i in
// bits 8i+7:8i of beat m), one beat per clock. Read: `rd_g` selects the group of
// N_PE consecutive filters the PEs are computing; rd_bias[o] is the bias of
// filter rd_g*N_PE + o, valid one clock after rd_en. With 16 PEs a read takes two
// 64-bit words, which a dual-port block RAM supplies in one clock. The word
// organisation is this design's choice.
module bias_memory
  import conv_pkg::*;
#(
  parameter int unsigned N_CH = 256,
  parameter int unsigned N_PE = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ld_init,
  input  logic                          wr_en,
  input  logic [BUS_W-1:0]              wr_data,
  input  logic                          rd_en,
  input  logic [$clog2(N_CH/N_PE)-1:0]  rd_g,
  output logic [BIAS_W-1:0]             rd_bias [N_PE]
);
  localparam int unsigned NWORD = N_CH / 8;
  localparam int unsigned WPG   = N_PE / 8;   // words per read group
  localparam int unsigned AW    = $clog2(NWORD);

  logic [BUS_W-1:0] mem [NWORD];
  logic [BUS_W-1:0] q [WPG];
  logic [AW-1:0]    wr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       wr_addr <= '0;
    else if (ld_init) wr_addr <= '0;
    else if (wr_en)   wr_addr <= wr_addr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en)
      for (int j = 0; j < WPG; j++) q[j] <= mem[32'(rd_g) * WPG + j];
  end

  always_comb
    for (int o = 0; o < N_PE; o++)
      rd_bias[o] = q[o / 8][(o % 8) * 8 +: 8];
endmodule
