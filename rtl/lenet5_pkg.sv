// lenet5_pkg: number formats, layer sizes and shared types of the LeNet-5
// accelerator.
//
// Number formats. Stored activations, weights and biases are 8-bit signed
// fixed point with 2 integer bits (sign included) and 6 fraction bits (Q2.6,
// range -2 .. +1.984). Accumulation is done in 12-bit signed fixed point with
// 6 integer bits and 6 fraction bits (Q6.6, range -32 .. +31.984). A product
// of two Q2.6 values is widened to 18 bits with 6 integer bits and 12
// fraction bits (Q6.12) before it is reduced to Q6.6. These widths follow the
// accelerator description; the layer sizes are the classic LeNet-5 ones.
package lenet5_pkg;

  // ---- fixed-point formats -------------------------------------------
  localparam int unsigned DATA_W = 8;   // Q2.6 storage word
  localparam int unsigned FRAC_W = 6;   // fraction bits of every format
  localparam int unsigned ACC_W  = 12;  // Q6.6 accumulator word
  localparam int unsigned PROD_W = 18;  // Q6.12 product word

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  // How a product is reduced from Q6.12 to Q6.6 before accumulation.
  //   MAC_ROUNDED : round toward zero (approximate MAC, rounded variant)
  //   MAC_CARRY   : drop 6 LSBs, add the product's sign bit as carry-in
  //   MAC_TRUNC   : drop 6 LSBs (plain shortening, used by pooling and FC)
  typedef enum logic [1:0] {
    MAC_ROUNDED = 2'd0,
    MAC_CARRY   = 2'd1,
    MAC_TRUNC   = 2'd2
  } mac_mode_e;

  // ---- LeNet-5 geometry ----------------------------------------------
  localparam int unsigned KSIZE   = 5;   // convolution kernel edge
  localparam int unsigned IMG_H   = 32;
  localparam int unsigned IMG_W   = 32;
  localparam int unsigned C1_OUT  = 6;   // Conv1: 1 -> 6 maps, 28x28
  localparam int unsigned C2_OUT  = 16;  // Conv2: 6 -> 16 maps, 10x10
  localparam int unsigned C3_OUT  = 120; // Conv3: 16 -> 120 maps, 1x1
  localparam int unsigned F1_OUT  = 84;  // FC1: 120 -> 84
  localparam int unsigned F2_OUT  = 10;  // FC2: 84 -> 10 class scores

  // Index of each layer on the parameter load bus.
  typedef enum logic [2:0] {
    L_CONV1 = 3'd0,
    L_POOL1 = 3'd1,
    L_CONV2 = 3'd2,
    L_POOL2 = 3'd3,
    L_CONV3 = 3'd4,
    L_FC1   = 3'd5,
    L_FC2   = 3'd6
  } layer_e;

  // One write on the parameter load bus. The value is an IEEE-754 single;
  // within a layer the weights come first and the biases follow them.
  typedef struct packed {
    layer_e      layer;
    logic [15:0] addr;
    logic [31:0] value;
  } cfg_wr_t;

  // Reduce a Q6.12 product to Q6.6 (the carry bit of MAC_CARRY is added
  // separately by the adder, see approx_mac).
  function automatic acc_t reduce_product(prod_t p, mac_mode_e mode);
    acc_t q;
    q = acc_t'(p >>> FRAC_W);                       // floor
    if (mode == MAC_ROUNDED && p[PROD_W-1] && (p[FRAC_W-1:0] != '0))
      q = q + acc_t'(1);                            // toward zero
    return q;
  endfunction

endpackage
