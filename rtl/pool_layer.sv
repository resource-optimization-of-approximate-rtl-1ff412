// pool_layer: LeNet-5 subsampling layer (Pool1 or Pool2).
//
// Each of the C maps is halved in width and height. For map c and output
// position (oy, ox) the layer averages the 2x2 window at (2*oy, 2*ox),
// scales the average by the map's trained weight, adds the map's trained
// bias and applies tanh:
//   y = tanh( bias[c] + w[c] * (x00 + x01 + x10 + x11) / 4 )
// The arithmetic is 12-bit Q6.6: the four Q2.6 inputs are summed exactly,
// the division by 4 is an arithmetic shift (floor), the Q6.6 x Q2.6 product
// is shortened back to Q6.6 by dropping its 6 low bits (floor) and all
// additions wrap. The weight and bias per map, the average, tanh and the
// 12-bit arithmetic follow the accelerator description; the order of the
// operations and the floor rounding are this design's choices.
//
// One input word is read per cycle, so an output takes 4 cycles and the
// layer about 4*C*OH*OW cycles per image. The start and finish handshake
// with the two feature buffers is the same as in conv_layer.
//
// Timing: address at t, operand accumulated at t+1, result written at t+2.
module pool_layer
  import lenet5_pkg::*;
#(
  parameter int unsigned C   = 6,
  parameter int unsigned IH  = 28,
  parameter int unsigned IW  = 28,
  localparam int unsigned OH = IH / 2,
  localparam int unsigned OW = IW / 2,
  localparam int unsigned NP = 2 * C,                     // weights + biases
  localparam int unsigned IN_N  = C * IH * IW,
  localparam int unsigned OUT_N = C * OH * OW,
  localparam int unsigned PAW = (NP > 1) ? $clog2(NP) : 1,
  localparam int unsigned IAW = (IN_N > 1) ? $clog2(IN_N) : 1,
  localparam int unsigned OAW = (OUT_N > 1) ? $clog2(OUT_N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cfg_we,
  input  logic [PAW-1:0] cfg_addr,
  input  data_t          cfg_data,
  input  logic           in_ready,
  output logic [IAW-1:0] in_addr [1],
  input  data_t          in_data [1],
  output logic           in_release,
  input  logic           out_free,
  output logic           out_we,
  output logic [OAW-1:0] out_addr,
  output data_t          out_data,
  output logic           out_commit,
  output logic           busy
);

  logic        running;
  int unsigned c, oy, ox, d;          // d: window element 0..3
  logic        img_last;

  assign img_last = (d == 3) && (c == C-1) && (oy == OH-1) && (ox == OW-1);

  logic [PAW-1:0] p_addr [2];
  data_t          p_data [2];

  param_ram #(.W(DATA_W), .DEPTH(NP), .NRD(2)) u_params (
    .clk     (clk),
    .we      (cfg_we),
    .waddr   (cfg_addr),
    .wdata   (cfg_data),
    .rd_addr (p_addr),
    .rd_data (p_data)
  );

  assign in_addr[0] = IAW'((c * IH + 2 * oy + d / 2) * IW + 2 * ox + d % 2);
  assign p_addr[0]  = PAW'(c);
  assign p_addr[1]  = PAW'(C + c);

  logic           v1, first1, last1, fin1, v2, fin2;
  logic [OAW-1:0] oaddr1, oaddr2;
  acc_t           sum_q, sum_d, tot2;
  data_t          w2, b2;

  assign sum_d = (first1 ? acc_t'(0) : sum_q) + acc_t'(in_data[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      {c, oy, ox, d} <= '0;
      {v1, first1, last1, fin1, v2, fin2} <= '0;
      oaddr1 <= '0;
      oaddr2 <= '0;
      sum_q  <= '0;
      tot2   <= '0;
      w2     <= '0;
      b2     <= '0;
    end else begin
      if (!running) begin
        if (in_ready && out_free && !fin1 && !fin2) running <= 1'b1;
      end else begin
        if (img_last) running <= 1'b0;
        if (d != 3) d <= d + 1;
        else begin
          d <= 0;
          if (ox != OW-1) ox <= ox + 1;
          else begin
            ox <= 0;
            if (oy != OH-1) oy <= oy + 1;
            else begin
              oy <= 0;
              if (c != C-1) c <= c + 1;
              else c <= 0;
            end
          end
        end
      end
      v1     <= running;
      first1 <= (d == 0);
      last1  <= (d == 3);
      fin1   <= running && img_last;
      oaddr1 <= OAW'((c * OH + oy) * OW + ox);
      if (v1) sum_q <= sum_d;
      v2   <= v1 && last1;
      fin2 <= fin1;
      if (v1 && last1) begin
        tot2   <= sum_d;
        w2     <= p_data[0];
        b2     <= p_data[1];
        oaddr2 <= oaddr1;
      end
    end
  end

  // scale, bias and activation
  acc_t        avg, scaled, pre;
  logic signed [ACC_W+DATA_W-1:0] prod;   // Q8.12

  always_comb begin
    avg    = tot2 >>> 2;
    prod   = avg * w2;
    scaled = acc_t'(prod >>> FRAC_W);
    pre    = scaled + acc_t'(b2);
  end

  tanh_lut u_tanh (.x(pre), .y(out_data));

  assign out_we     = v2;
  assign out_addr   = oaddr2;
  assign out_commit = fin2;
  assign in_release = fin2;
  assign busy       = running || v1 || v2 || fin2;

endmodule
