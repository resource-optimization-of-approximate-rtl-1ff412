// flp2fix: IEEE-754 single precision to signed fixed point.
//
// The accelerator receives its image pixels, weights and biases as 32-bit
// floating-point numbers and keeps them internally as short fixed-point
// words; this block does that conversion. The float is taken apart into
// sign, 8-bit exponent and 24-bit significand (hidden one restored), the
// significand is shifted so that F fraction bits remain, and the result is
// rounded toward minus infinity (a plain two's-complement truncation) and
// saturated to the W-bit range. Zero and subnormal inputs give 0, an
// infinity saturates by its sign, and a NaN gives 0.
// Converting float inputs to fixed point follows the accelerator
// description; the floor rounding, the saturation and the handling of the
// special values are this design's choices.
//
// Interface: f is the float bit pattern, q the W-bit result with F fraction
// bits (default Q2.6). Timing: purely combinational.
module flp2fix #(
  parameter int unsigned W = 8,     // result width, sign included
  parameter int unsigned F = 6      // fraction bits of the result
) (
  input  logic [31:0]         f,
  output logic signed [W-1:0] q
);

  localparam logic [W-1:0] POS_MAX = {1'b0, {(W-1){1'b1}}};
  localparam logic [W-1:0] NEG_MIN = {1'b1, {(W-1){1'b0}}};

  logic        sgn;
  logic [7:0]  expo;
  logic [23:0] mant;
  int          sh;           // left shift that scales the significand to q
  logic [63:0] mag;          // |value| * 2^F, truncated toward zero
  logic        lost;         // a nonzero bit was shifted out
  logic [63:0] mag_fl;       // magnitude after floor correction

  assign sgn  = f[31];
  assign expo = f[30:23];
  assign mant = {1'b1, f[22:0]};

  always_comb begin
    sh     = int'(expo) - 150 + int'(F);
    mag    = '0;
    lost   = 1'b0;
    q      = '0;
    mag_fl = '0;
    if (expo == 8'hFF) begin
      if (f[22:0] == '0) q = sgn ? NEG_MIN : POS_MAX;   // infinity
      else               q = '0;                        // NaN
    end else if (expo != 8'h00) begin
      if (sh > int'(W)) begin
        q = sgn ? NEG_MIN : POS_MAX;                    // far out of range
      end else begin
        if (sh >= 0) begin
          mag = 64'(mant) << sh;
        end else if (sh > -25) begin
          mag  = 64'(mant) >> (-sh);
          lost = (64'(mant) & ((64'd1 << (-sh)) - 64'd1)) != '0;
        end else begin
          lost = 1'b1;
        end
        // floor: a negative value with discarded bits moves one LSB down
        mag_fl = mag + 64'(sgn && lost);
        if (!sgn) q = (mag_fl > 64'(POS_MAX)) ? POS_MAX : W'(mag_fl);
        else      q = (mag_fl > 64'(NEG_MIN)) ? NEG_MIN : W'(-mag_fl);
      end
    end
  end

endmodule
