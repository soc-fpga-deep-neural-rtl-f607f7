// conv_pkg: types and constants shared by the 3x3 convolution accelerator.
//
// The accelerator computes one 3x3, stride-1, zero-padding-1 convolution layer
// with 4-bit signed weights, 8-bit signed activations and 8-bit signed biases,
// all in power-of-two fixed point. The numeric widths below are the ones the
// design is built around: a 12-bit product, a 20-bit MAC accumulator (enough for
// 288 products of -128 * -8 without overflow), adder-tree stages of 21, 22 and 23
// bits, a 23-bit aligned bias and a 24-bit pre-quantization sum.
// Scale fields hold the number of fractional bits of each quantity; the 8-bit
// field width and the register layout are this design's own choice.
package conv_pkg;

  localparam int unsigned ACT_W  = 8;   // activation bits
  localparam int unsigned WGT_W  = 4;   // weight bits
  localparam int unsigned BIAS_W = 8;   // bias bits
  localparam int unsigned PROD_W = ACT_W + WGT_W;  // 12
  localparam int unsigned ACC_W  = 20;  // MAC accumulator
  localparam int unsigned SUM1_W = 21;
  localparam int unsigned SUM2_W = 22;
  localparam int unsigned SUM3_W = 23;
  localparam int unsigned BALN_W = 23;  // aligned bias
  localparam int unsigned SUM4_W = 24;  // sum tree + bias
  localparam int unsigned KPOS   = 9;   // 3x3 kernel positions
  localparam int unsigned BUS_W  = 64;  // input stream width
  localparam int unsigned DIM_W  = 16;  // width of a_x / a_y
  localparam int unsigned SCL_W  = 8;   // width of a scale field

  // Layer configuration, written over AXI-Lite before a start.
  typedef struct packed {
    logic [DIM_W-1:0] a_x;          // input (= output) columns
    logic [DIM_W-1:0] a_y;          // input (= output) rows
    logic [SCL_W-1:0] output_scale; // fractional bits wanted at the output
    logic [SCL_W-1:0] input_scale;  // fractional bits of the input activations
    logic [SCL_W-1:0] weight_scale; // fractional bits of the weights
    logic [SCL_W-1:0] bias_scale;   // fractional bits of the bias
  } layer_cfg_t;

  // Controller states.
  typedef enum logic [2:0] {
    S_IDLE, S_WLOAD, S_BLOAD, S_ALOAD, S_MAC, S_DRAIN, S_DONE
  } ctrl_state_t;

endpackage
