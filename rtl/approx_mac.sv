// approx_mac: approximate multiply-accumulate unit with an unrolled
// multiplier/adder tree.
//
// Each cycle with in_valid high the unit multiplies LANES pairs of Q2.6
// operands. Every 16-bit product is sign-extended to an 18-bit Q6.12 word
// and reduced to a 12-bit Q6.6 word before it reaches the adders, according
// to MODE:
//   MAC_ROUNDED  round toward zero: drop the 6 low fraction bits and add one
//                LSB back when the product is negative and a dropped bit was
//                set, so positive and negative values are treated alike.
//   MAC_CARRY    drop the 6 low fraction bits (a floor) and feed the sign bit
//                of the reduced product into the adder as an extra carry-in,
//                which pulls a negative product one LSB toward +infinity.
//   MAC_TRUNC    drop the 6 low fraction bits only; this is the plain 12-bit
//                shortening used by the pooling and fully connected layers.
// The reduced products are summed by a binary adder tree and added to the
// 12-bit accumulator (or, when `first` is set, to `init`, which carries the
// bias). All additions wrap in 12-bit two's complement: the 6 integer bits
// are the amount chosen to hold a 5x5 window of products in -1..1.
// The two approximate reductions and the 18/12-bit widths follow the
// accelerator description; the lane count, the heap-shaped tree and the
// first/last framing are this design's choices. LANES = 1 is exactly the
// single multiplier + accumulator unit.
//
// Timing: one cycle. The accumulator updates on the clock edge after a
// valid beat; when that beat had `last` set, out_valid is high for one cycle
// with the finished sum on out_acc.
module approx_mac
  import lenet5_pkg::*;
#(
  parameter int unsigned LANES = 1,
  parameter mac_mode_e   MODE  = MAC_ROUNDED
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  first,              // start a new sum from init
  input  logic  last,               // this beat completes the sum
  input  acc_t  init,               // start value (bias, Q6.6)
  input  data_t a [LANES],          // Q2.6 activations
  input  data_t b [LANES],          // Q2.6 weights
  output logic  out_valid,
  output acc_t  out_acc
);

  acc_t acc_q;
  acc_t sum;

  always_comb begin
    acc_t  node  [2*LANES];
    prod_t p;
    acc_t  carries;
    carries = '0;
    for (int i = 0; i < 2*LANES; i++) node[i] = '0;
    // leaves: reduced products
    for (int i = 0; i < int'(LANES); i++) begin
      p = a[i] * b[i];   // operands sign-extended to 18 bits
      node[LANES+i] = reduce_product(p, MODE);
      if (MODE == MAC_CARRY) carries = carries + acc_t'(node[LANES+i][ACC_W-1]);
    end
    // internal nodes, deepest first: node[k] = node[2k] + node[2k+1]
    for (int k = int'(LANES) - 1; k >= 1; k--) node[k] = node[2*k] + node[2*k+1];
    sum = (first ? init : acc_q) + node[1] + carries;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_acc   <= '0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) begin
        acc_q <= sum;
        if (last) out_acc <= sum;
      end
    end
  end

endmodule
