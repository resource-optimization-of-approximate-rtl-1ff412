// conv_layer: one convolution layer of LeNet-5 (Conv1, Conv2 or Conv3).
//
// For every output map co and position (oy, ox) the layer computes
//   y = tanh( bias[co] + sum_{ci,ky,kx} x[ci][oy+ky][ox+kx] * w[co][ci][ky][kx] )
// with a KxK kernel (K = 5), no padding and stride 1, so an IHxIW input
// gives an (IH-K+1)x(IW-K+1) output. Activations, weights and biases are
// Q2.6; products are reduced and accumulated by approx_mac in Q6.6 with the
// selected approximate rounding (MODE), and tanh_lut turns the sum back
// into Q2.6.
//
// Work is sequenced by a loop nest co, oy, ox, ci, ky, kx-group; each beat
// feeds LANES products of one kernel row to the MAC (LANES = 1: one product
// per beat; LANES = K: a whole kernel row through the adder tree). One
// output takes CIN*K*K/LANES beats, so the layer takes about
// COUT*OH*OW*CIN*K*K/LANES cycles per image plus 3 cycles to fill and drain.
//
// The layer starts when its input buffer holds a committed image
// (in_ready) and its output buffer has a free bank (out_free). When the last
// result is written it commits the output bank and releases the input bank
// in the same cycle, then waits for the next image.
// The layer function, the fixed-point formats and the approximate MAC come
// from the accelerator description; the loop order, the lane grouping and
// the buffer handshake are this design's choices.
//
// Timing: beat issued at cycle t (addresses), operands arrive at t+1 from
// the registered memories and are accumulated, the result is written to the
// output buffer at t+2.
module conv_layer
  import lenet5_pkg::*;
#(
  parameter int unsigned CIN   = 1,
  parameter int unsigned COUT  = 6,
  parameter int unsigned IH    = 32,
  parameter int unsigned IW    = 32,
  parameter int unsigned K     = 5,
  parameter int unsigned LANES = 1,          // 1 or K
  parameter mac_mode_e   MODE  = MAC_ROUNDED,
  localparam int unsigned OH   = IH - K + 1,
  localparam int unsigned OW   = IW - K + 1,
  localparam int unsigned NW   = COUT * CIN * K * K,      // weights
  localparam int unsigned NP   = NW + COUT,               // + biases
  localparam int unsigned IN_N = CIN * IH * IW,
  localparam int unsigned OUT_N = COUT * OH * OW,
  localparam int unsigned PAW  = $clog2(NP),
  localparam int unsigned IAW  = (IN_N > 1) ? $clog2(IN_N) : 1,
  localparam int unsigned OAW  = (OUT_N > 1) ? $clog2(OUT_N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // parameter load (Q2.6 words, weights then biases)
  input  logic           cfg_we,
  input  logic [PAW-1:0] cfg_addr,
  input  data_t          cfg_data,
  // input feature buffer (consumer side)
  input  logic           in_ready,
  output logic [IAW-1:0] in_addr [LANES],
  input  data_t          in_data [LANES],
  output logic           in_release,
  // output feature buffer (producer side)
  input  logic           out_free,
  output logic           out_we,
  output logic [OAW-1:0] out_addr,
  output data_t          out_data,
  output logic           out_commit,
  // status
  output logic           busy
);

  localparam int unsigned KG = K / LANES;   // beats per kernel row

  // ---------------- loop counters (issue stage) ----------------
  logic        running;
  int unsigned co, oy, ox, ci, ky, kg;
  logic        beat_first, beat_last, img_last;

  assign beat_first = (ci == 0) && (ky == 0) && (kg == 0);
  assign beat_last  = (ci == CIN-1) && (ky == K-1) && (kg == KG-1);
  assign img_last   = beat_last && (co == COUT-1) && (oy == OH-1) && (ox == OW-1);

  // ---------------- parameter memory ----------------
  logic [PAW-1:0] p_addr [LANES+1];
  data_t          p_data [LANES+1];

  param_ram #(.W(DATA_W), .DEPTH(NP), .NRD(LANES+1)) u_params (
    .clk     (clk),
    .we      (cfg_we),
    .waddr   (cfg_addr),
    .wdata   (cfg_data),
    .rd_addr (p_addr),
    .rd_data (p_data)
  );

  always_comb begin
    for (int l = 0; l < int'(LANES); l++) begin
      in_addr[l] = IAW'((ci * IH + oy + ky) * IW + ox + kg * LANES + l);
      p_addr[l]  = PAW'(((co * CIN + ci) * K + ky) * K + kg * LANES + l);
    end
    p_addr[LANES] = PAW'(NW + co);          // bias
  end

  // ---------------- pipeline registers ----------------
  logic           v1, first1, last1, fin1;
  logic [OAW-1:0] oaddr1, oaddr2;
  logic           fin2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      {co, oy, ox, ci, ky, kg} <= '0;
      {v1, first1, last1, fin1, fin2} <= '0;
      oaddr1 <= '0;
      oaddr2 <= '0;
    end else begin
      // issue stage
      if (!running) begin
        if (in_ready && out_free && !fin1 && !fin2) running <= 1'b1;
      end else begin
        if (img_last) running <= 1'b0;
        if (kg != KG-1) kg <= kg + 1;
        else begin
          kg <= 0;
          if (ky != K-1) ky <= ky + 1;
          else begin
            ky <= 0;
            if (ci != CIN-1) ci <= ci + 1;
            else begin
              ci <= 0;
              if (ox != OW-1) ox <= ox + 1;
              else begin
                ox <= 0;
                if (oy != OH-1) oy <= oy + 1;
                else begin
                  oy <= 0;
                  if (co != COUT-1) co <= co + 1;
                  else co <= 0;
                end
              end
            end
          end
        end
      end
      // operand stage
      v1     <= running;
      first1 <= beat_first;
      last1  <= beat_last;
      fin1   <= running && img_last;
      oaddr1 <= OAW'((co * OH + oy) * OW + ox);
      // result stage
      fin2   <= fin1;
      if (v1 && last1) oaddr2 <= oaddr1;
    end
  end

  // ---------------- datapath ----------------
  acc_t mac_out;
  logic mac_valid;

  approx_mac #(.LANES(LANES), .MODE(MODE)) u_mac (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v1),
    .first     (first1),
    .last      (last1),
    .init      (acc_t'(p_data[LANES])),
    .a         (in_data),
    .b         (p_data[0:LANES-1]),
    .out_valid (mac_valid),
    .out_acc   (mac_out)
  );

  tanh_lut u_tanh (.x(mac_out), .y(out_data));

  assign out_we     = mac_valid;
  assign out_addr   = oaddr2;
  assign out_commit = fin2;
  assign in_release = fin2;
  assign busy       = running || v1 || fin2;

endmodule
