// line_fifo: block-RAM line buffer between two rows of the activation window.
//
// In the activation memory this FIFO is always full once the initial load is
// done: every shift pushes one 64-bit word in and pops the oldest out. It is
// therefore built as a circular delay line of run-time length `len` words
// (len = (a_x - 1) * 32 for a 256-channel layer): the word written by a shift
// leaves `len` shifts later. The head word is read one clock ahead into a
// register, so the RAM has one synchronous read and one write port, as a block
// RAM. `init` rewinds the pointer at the start of a layer; the old contents are
// flushed out by the initial load and need no clearing.
//
// Interface: `shift` pushes `din`; `dout` is the word that leaves on that shift.
// Requires len >= 2. The delay-line construction is this design's choice for the
// FIFOs the design calls for.
module line_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 2528   // (80 - 1) * 32 words
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic [$clog2(DEPTH+1)-1:0] len,
  input  logic                     shift,
  input  logic [WIDTH-1:0]         din,
  output logic [WIDTH-1:0]         dout
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr, ptr_nxt;

  always_comb begin
    if (32'(ptr) + 1 >= 32'(len)) ptr_nxt = '0;
    else                          ptr_nxt = ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (shift && !init) mem[ptr] <= din;
    if (init)       dout <= mem[0];
    else if (shift) dout <= mem[ptr_nxt];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ptr <= '0;
    else if (init)  ptr <= '0;
    else if (shift) ptr <= ptr_nxt;
  end
endmodule
