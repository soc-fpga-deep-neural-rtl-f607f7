// activation_memory: sliding 3x3 window over the zero-padded input feature map.
//
// Activations arrive in ZXY order (all channels of one x,y position, then the
// next x, then the next row), 8 channels per 64-bit word, so one position is
// NW = N_CH/8 words. The memory keeps exactly the (2*(a_x+2)+3) positions needed
// so that every activation is fetched from external memory once:
//   * three rows of three positions in flip-flop shift registers - the window
//     the PEs read from (random access is needed here);
//   * two line FIFOs in block RAM (a_x >= 2), each holding the (a_x - 1) positions of a
//     padded row that lie between the window columns of consecutive rows.
// A shift moves one word along the chain: input -> bottom window row -> FIFO 2 ->
// middle row -> FIFO 1 -> top row -> discarded. Loading one position (NW shifts)
// moves the window one column right; loading three moves it to the start of the
// next row. Padding words (zeros) are shifted in by the controller like data.
//
// Read port: kernel position rd_p = ky*3 + kx (ky, kx = 0..2 from the top-left
// of the window) and channel word rd_n select one of the 9*NW words through a
// multiplexer; the word is registered, so it is valid one clock after rd_en.
// The word is broadcast to every PE. Follows the described structure; the exact
// register layout and the one-clock read register are this design's choices.
module activation_memory
  import conv_pkg::*;
#(
  parameter int unsigned N_CH  = 256,
  parameter int unsigned MAX_X = 80
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          init,     // start of a layer
  input  logic [DIM_W-1:0]              a_x,
  input  logic                          shift,
  input  logic [BUS_W-1:0]              din,
  input  logic                          rd_en,
  input  logic [3:0]                    rd_p,
  input  logic [$clog2(N_CH/8)-1:0]     rd_n,
  output logic [BUS_W-1:0]              rd_word
);
  localparam int unsigned NW    = N_CH / 8;        // words per position
  localparam int unsigned ROW_W = 3 * NW;          // words per window row
  localparam int unsigned FDEP  = (MAX_X - 1) * NW;
  localparam int unsigned LW    = $clog2(FDEP + 1);

  // win[r][i]: row r (0 = top); index i counts from the newest word of the row.
  // Fully packed so that it is plain registers, not a RAM.
  logic [2:0][ROW_W-1:0][BUS_W-1:0] win;
  logic [BUS_W-1:0] fifo1_out, fifo2_out;
  logic [LW-1:0]    len;
  logic [1:0]       r_sel, c_sel;

  always_comb len = LW'((32'(a_x) - 1) * NW);

  line_fifo #(.WIDTH(BUS_W), .DEPTH(FDEP)) u_line2 (
    .clk(clk), .rst_n(rst_n), .init(init), .len(len), .shift(shift),
    .din(win[2][ROW_W-1]), .dout(fifo2_out)
  );
  line_fifo #(.WIDTH(BUS_W), .DEPTH(FDEP)) u_line1 (
    .clk(clk), .rst_n(rst_n), .init(init), .len(len), .shift(shift),
    .din(win[1][ROW_W-1]), .dout(fifo1_out)
  );

  always_ff @(posedge clk) begin
    if (shift) begin
      win[2] <= {win[2][ROW_W-2:0], din};
      win[1] <= {win[1][ROW_W-2:0], fifo2_out};
      win[0] <= {win[0][ROW_W-2:0], fifo1_out};
    end
  end

  // Kernel column kx is the (2-kx)-th newest position of its row; within a
  // position, channel word n was shifted in n-th, so it sits NW-1-n from the
  // newest end.
  always_comb begin
    r_sel = 2'(rd_p / 3);
    c_sel = 2'(rd_p % 3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_word <= '0;
    else if (rd_en) rd_word <= win[r_sel][(2 - 32'(c_sel)) * NW + (NW - 1 - 32'(rd_n))];
  end
endmodule
