// weight_memory: on-chip store for all weights of one layer, with one read
// port per PE.
//
// A layer has 3*3*N_CH*N_CH 4-bit weights (2.36 Mbit for 256 channels), held as
// 32-bit words of 8 consecutive input channels. The words are spread over
// NB = N_PE/2 dual-port banks by filter number (filter N lives in bank N mod NB),
// and every bank is split into 9 memories, one per kernel position, each of a
// power-of-two depth (1024 words for 256 channels). Inside a kernel-position
// memory the order is NZXY: address = n * (N_CH/NB) + N / NB, where n is the
// 8-channel group. The 16 PEs work on 16 consecutive filters, so each bank serves
// two of them per clock, one per port.
//
// Load: the input stream brings the weights in ZXYN order (channels fastest,
// then kernel x, kernel y, filter), 16 weights per 64-bit beat. Each beat is
// written as two 32-bit words on two clocks (low half = channels 16m..16m+7),
// so ld_ready is low every other clock: one beat per two clocks.
// Read: (rd_p, rd_n, rd_g) give the kernel position, the 8-channel group and the
// 16-filter group; rd_w[o] is the word of filter rd_g*N_PE + o, valid one clock
// after rd_en. Structure and orders follow the accelerator description; the
// load handshake is this design's choice.
module weight_memory
  import conv_pkg::*;
#(
  parameter int unsigned N_CH = 256,
  parameter int unsigned N_PE = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // load port
  input  logic                           ld_init,
  input  logic                           ld_valid,
  output logic                           ld_ready,
  input  logic [BUS_W-1:0]               ld_data,
  // read port
  input  logic                           rd_en,
  input  logic [3:0]                     rd_p,
  input  logic [$clog2(N_CH/8)-1:0]      rd_n,
  input  logic [$clog2(N_CH/N_PE)-1:0]   rd_g,
  output logic [31:0]                    rd_w [N_PE]
);
  localparam int unsigned NB    = N_PE / 2;            // banks
  localparam int unsigned FPB   = N_CH / NB;           // filters per bank
  localparam int unsigned NW    = N_CH / 8;            // 8-channel groups
  localparam int unsigned DEPTH = NW * FPB;            // words per kernel memory
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned NZ16  = N_CH / 16;           // beats per (kx,ky,N)

  // ---------------------------------------------------------------- load
  logic                         half;       // 1: writing the high half
  logic [31:0]                  hi_q;
  logic [$clog2(NZ16+1)-1:0]    zg;
  logic [1:0]                   kx, ky;
  logic [$clog2(N_CH)-1:0]      fn;
  logic                         wr_en;
  logic [31:0]                  wr_data;
  logic [AW-1:0]                wr_addr;
  logic [3:0]                   wr_p;
  logic [$clog2(NB)-1:0]        wr_b;

  always_comb begin
    ld_ready = !half;
    wr_en    = half || (ld_valid && ld_ready);
    wr_data  = half ? hi_q : ld_data[31:0];
    wr_p     = 4'(ky * 3 + kx);
    wr_b     = fn[$clog2(NB)-1:0];
    wr_addr  = AW'((32'(zg) * 2 + 32'(half)) * FPB + 32'(fn) / NB);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half <= 1'b0; hi_q <= '0; zg <= '0; kx <= '0; ky <= '0; fn <= '0;
    end else if (ld_init) begin
      half <= 1'b0; zg <= '0; kx <= '0; ky <= '0; fn <= '0;
    end else if (half) begin
      half <= 1'b0;
      if (32'(zg) == NZ16 - 1) begin
        zg <= '0;
        if (kx == 2'd2) begin
          kx <= '0;
          if (ky == 2'd2) begin
            ky <= '0;
            fn <= fn + 1'b1;
          end else ky <= ky + 1'b1;
        end else kx <= kx + 1'b1;
      end else zg <= zg + 1'b1;
    end else if (ld_valid) begin
      half <= 1'b1;
      hi_q <= ld_data[63:32];
    end
  end

  // ---------------------------------------------------------------- banks
  logic [31:0] q [NB][KPOS][2];
  logic [3:0]  p_q;
  logic [AW-1:0] rd_addr [2];

  always_comb
    for (int port = 0; port < 2; port++)
      rd_addr[port] = AW'(32'(rd_n) * FPB + 32'(rd_g) * 2 + port);

  for (genvar b = 0; b < NB; b++) begin : g_bank
    for (genvar p = 0; p < KPOS; p++) begin : g_kpos
      logic [31:0] mem [DEPTH];
      always_ff @(posedge clk) begin
        if (wr_en && 32'(wr_b) == b && 32'(wr_p) == p) mem[wr_addr] <= wr_data;
        if (rd_en && 32'(rd_p) == p) begin
          q[b][p][0] <= mem[rd_addr[0]];
          q[b][p][1] <= mem[rd_addr[1]];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     p_q <= '0;
    else if (rd_en) p_q <= rd_p;
  end

  always_comb
    for (int o = 0; o < N_PE; o++)
      rd_w[o] = q[o % NB][p_q][o / NB];
endmodule
