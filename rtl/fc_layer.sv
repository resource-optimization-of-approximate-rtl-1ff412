// fc_layer: fully connected layer of LeNet-5 (FC1 or FC2).
//
// Every output neuron o is connected to every input i:
//   y[o] = tanh( bias[o] + sum_i x[i] * w[o][i] )
// Inputs, weights and biases are Q2.6. The sum is formed by approx_mac in
// 12-bit Q6.6; by default (MODE = MAC_TRUNC) each Q2.6 x Q2.6 product is
// shortened to Q6.6 by dropping its 6 low bits, the plain 12-bit arithmetic
// used outside the convolution layers. tanh_lut gives the Q2.6 result.
// The connectivity, bias, tanh and 12-bit arithmetic follow the accelerator
// description; the sequencing (one product per cycle, outputs in order) and
// the buffer handshake are this design's choices.
//
// The layer takes NIN cycles per output, NOUT*NIN + 3 cycles per image.
// It starts when its input buffer holds a committed vector and its output
// buffer has a free bank, and commits/releases both when done, as
// conv_layer does.
//
// Timing: address at t, product accumulated at t+1, result written at t+2.
module fc_layer
  import lenet5_pkg::*;
#(
  parameter int unsigned NIN  = 120,
  parameter int unsigned NOUT = 84,
  parameter mac_mode_e   MODE = MAC_TRUNC,
  localparam int unsigned NW  = NIN * NOUT,
  localparam int unsigned NP  = NW + NOUT,
  localparam int unsigned PAW = $clog2(NP),
  localparam int unsigned IAW = (NIN > 1) ? $clog2(NIN) : 1,
  localparam int unsigned OAW = (NOUT > 1) ? $clog2(NOUT) : 1
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
  int unsigned o, i;
  logic        img_last;

  assign img_last = (i == NIN-1) && (o == NOUT-1);

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

  assign in_addr[0] = IAW'(i);
  assign p_addr[0]  = PAW'(o * NIN + i);
  assign p_addr[1]  = PAW'(NW + o);

  logic           v1, first1, last1, fin1, fin2;
  logic [OAW-1:0] oaddr1, oaddr2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      {o, i} <= '0;
      {v1, first1, last1, fin1, fin2} <= '0;
      oaddr1 <= '0;
      oaddr2 <= '0;
    end else begin
      if (!running) begin
        if (in_ready && out_free && !fin1 && !fin2) running <= 1'b1;
      end else begin
        if (img_last) running <= 1'b0;
        if (i != NIN-1) i <= i + 1;
        else begin
          i <= 0;
          if (o != NOUT-1) o <= o + 1;
          else o <= 0;
        end
      end
      v1     <= running;
      first1 <= (i == 0);
      last1  <= (i == NIN-1);
      fin1   <= running && img_last;
      oaddr1 <= OAW'(o);
      fin2   <= fin1;
      if (v1 && last1) oaddr2 <= oaddr1;
    end
  end

  acc_t mac_out;
  logic mac_valid;

  approx_mac #(.LANES(1), .MODE(MODE)) u_mac (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v1),
    .first     (first1),
    .last      (last1),
    .init      (acc_t'(p_data[1])),
    .a         (in_data),
    .b         (p_data[0:0]),
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
