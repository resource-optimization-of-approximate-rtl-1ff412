// tanh_lut: hyperbolic tangent activation, Q6.6 in, Q2.6 out.
//
// Every layer of the network passes its 12-bit Q6.6 sum through tanh, whose
// output lies in -1..+1 and therefore fits the 8-bit Q2.6 storage format;
// this is where the four surplus integer bits of the accumulator are
// dropped. The function is a 512-entry table over the inputs -4 .. +3.984:
// outside that range the rounded result is already +-1 (64 or -64 in Q2.6,
// since tanh(x) rounds to 1 for |x| > 2.77), so the input is clamped first.
// Entry i holds round(64 * tanh(i/64)) for the signed 9-bit index i; the
// table is computed at elaboration, so no data file is needed.
// The use of tanh follows the network description; the table method, its
// range and round-to-nearest are this design's choices.
//
// Timing: purely combinational (a ROM read).
module tanh_lut
  import lenet5_pkg::*;
(
  input  acc_t  x,      // Q6.6
  output data_t y       // Q2.6
);

  localparam int unsigned IDX_W = 9;                 // Q3.6 table index
  typedef data_t lut_t [2**IDX_W];

  function automatic lut_t build_lut();
    lut_t l;
    for (int i = 0; i < 2**IDX_W; i++) begin
      real v;
      v    = real'($signed(IDX_W'(i))) / 64.0;
      l[i] = data_t'($rtoi($floor($tanh(v) * 64.0 + 0.5)));
    end
    return l;
  endfunction

  localparam lut_t LUT = build_lut();

  localparam acc_t XMAX = acc_t'(2**(IDX_W-1) - 1);  // +3.984
  localparam acc_t XMIN = -acc_t'(2**(IDX_W-1));     // -4.000

  logic [IDX_W-1:0] idx;

  always_comb begin
    if (x > XMAX)      idx = XMAX[IDX_W-1:0];
    else if (x < XMIN) idx = XMIN[IDX_W-1:0];
    else               idx = x[IDX_W-1:0];
  end

  assign y = LUT[idx];

endmodule
