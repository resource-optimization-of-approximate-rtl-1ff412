// fix2flp: signed fixed point to IEEE-754 single precision.
//
// The accelerator returns its class scores as 32-bit floating-point numbers;
// this block converts one W-bit fixed-point word with F fraction bits. The
// magnitude is normalised with a leading-one search, the exponent is the
// leading-one position minus F plus the bias 127, and the significand is the
// magnitude shifted up to 24 bits with the hidden one removed. For W <= 24
// every fixed-point value is represented exactly, so no rounding occurs.
// Converting the fixed-point outputs back to float follows the accelerator
// description; the circuit is this design's.
//
// Interface: q is the fixed-point word, f the float bit pattern.
// Timing: purely combinational.
module fix2flp #(
  parameter int unsigned W = 8,     // input width, sign included (<= 24)
  parameter int unsigned F = 6      // fraction bits of the input
) (
  input  logic signed [W-1:0] q,
  output logic [31:0]         f
);

  logic         sgn;
  logic [W-1:0] mag;
  int           lead;          // position of the leading one of mag
  logic [23:0]  norm;

  always_comb begin
    sgn  = q[W-1];
    mag  = sgn ? W'(-q) : W'(q);   // -2^(W-1) maps to 2^(W-1), still W bits
    lead = 0;
    for (int i = 0; i < int'(W); i++) if (mag[i]) lead = i;
    norm = 24'(mag) << (23 - lead);
    if (mag == '0) f = 32'd0;
    else           f = {sgn, 8'(lead - int'(F) + 127), norm[22:0]};
  end

endmodule
