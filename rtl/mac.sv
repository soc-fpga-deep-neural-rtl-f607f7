// mac: one multiply-and-accumulate operator of a processing element.
//
// Multiplies a signed 8-bit activation by a signed 4-bit weight (12-bit product)
// and adds it to a 20-bit accumulator register. The accumulator is sized so that
// the worst case of a 3x3x256 filter split over 8 MACs (288 products of
// -128 * -8 = 1024, i.e. 294912) fits without overflow or rounding.
//
// Interface: `en` adds the product this cycle; `clr` starts a new output pixel by
// discarding the old sum, so `clr` together with `en` loads the product alone.
// Timing: the result appears in `acc` one clock after the enabling edge.
// The clear-and-load-on-first-product behaviour is this design's choice; the
// widths follow the accelerator description.
module mac
  import conv_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [ACT_W-1:0] a,
  input  logic signed [WGT_W-1:0] w,
  output logic signed [ACC_W-1:0] acc
);
  logic signed [PROD_W-1:0] prod;
  logic signed [ACC_W-1:0]  base;

  always_comb begin
    prod = PROD_W'(a * w);
    base = clr ? '0 : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (en)       acc <= base + ACC_W'(prod);
    else if (clr)      acc <= '0;
  end
endmodule
