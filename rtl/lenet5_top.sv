// lenet5_top: LeNet-5 handwritten-digit classifier accelerator.
//
// A 32x32 image streams in as IEEE-754 single-precision pixels and ten
// class scores (digits 0..9) stream out as singles. Inside, all data are
// short fixed-point numbers (Q2.6 storage, Q6.6 accumulation) and the
// network runs as seven layer engines connected by double-buffered feature
// memories:
//
//   pixels -> flp2fix -> [b0 1x32x32] -> Conv1 -> [b1 6x28x28] -> Pool1
//          -> [b2 6x14x14] -> Conv2 -> [b3 16x10x10] -> Pool2 -> [b4 16x5x5]
//          -> Conv3 -> [b5 120] -> FC1 -> [b6 84] -> FC2 -> [b7 10]
//          -> fix2flp -> scores
//
// Every layer adds a trained bias and applies tanh; the pooling layers
// average 2x2 windows and scale them by a trained weight per map. The
// convolution layers use the approximate MAC (CONV_MODE, rounded variant by
// default); pooling and FC use plain 12-bit truncating arithmetic. Because
// every link is a two-bank buffer, the layers form a dataflow pipeline:
// each layer works on a different image, and a new image can enter once the
// slowest layer (Conv2) has finished the previous one.
//
// Configuration: before the first image the host writes every weight and
// bias once through cfg_valid/cfg (layer index, word address, float value;
// per layer the weights come first, then one bias per output map or
// neuron, in the order given in each layer's header). The values are
// converted to Q2.6 and kept on chip for all later images. Writes are meant
// to happen while no image is in flight.
//
// Streams: pix_valid/pix_ready carries 1024 pixels in row-major order;
// res_valid/res_ready carries 10 scores, res_idx giving the class and
// res_last marking class 9. Both are valid/ready handshakes: a word moves
// in a cycle where both are high.
//
// Timing at LANES = 1: about 423,000 cycles from the last pixel to the first
// score, and a new image every ~240,000 cycles (Conv2) in steady state.
// The network, the number formats, the approximate MAC and the float
// conversions at both ends follow the accelerator description; the buffer
// structure, the streaming interfaces and the load bus are this design's.
module lenet5_top
  import lenet5_pkg::*;
#(
  parameter int unsigned LANES     = 1,            // conv products per cycle (1 or 5)
  parameter mac_mode_e   CONV_MODE = MAC_ROUNDED,  // approximate MAC variant
  parameter mac_mode_e   FC_MODE   = MAC_TRUNC     // pooling/FC arithmetic
) (
  input  logic        clk,
  input  logic        rst_n,
  // parameter load
  input  logic        cfg_valid,
  input  cfg_wr_t     cfg,
  // image stream in
  input  logic        pix_valid,
  output logic        pix_ready,
  input  logic [31:0] pix_data,
  // score stream out
  output logic        res_valid,
  input  logic        res_ready,
  output logic [31:0] res_data,
  output logic [3:0]  res_idx,
  output logic        res_last,
  // status: one bit per layer, Conv1 in bit 0 .. FC2 in bit 6
  output logic [6:0]  layer_busy
);

  // ---------------- sizes ----------------
  localparam int unsigned C1H = IMG_H - KSIZE + 1;   // 28
  localparam int unsigned P1H = C1H / 2;             // 14
  localparam int unsigned C2H = P1H - KSIZE + 1;     // 10
  localparam int unsigned P2H = C2H / 2;             // 5
  localparam int unsigned N0 = IMG_H * IMG_W;
  localparam int unsigned N1 = C1_OUT * C1H * C1H;
  localparam int unsigned N2 = C1_OUT * P1H * P1H;
  localparam int unsigned N3 = C2_OUT * C2H * C2H;
  localparam int unsigned N4 = C2_OUT * P2H * P2H;
  localparam int unsigned N5 = C3_OUT;
  localparam int unsigned N6 = F1_OUT;
  localparam int unsigned N7 = F2_OUT;
  localparam int unsigned A0 = $clog2(N0), A1 = $clog2(N1), A2 = $clog2(N2),
                          A3 = $clog2(N3), A4 = $clog2(N4), A5 = $clog2(N5),
                          A6 = $clog2(N6), A7 = $clog2(N7);
  // parameter-memory address widths (weights + biases per layer)
  localparam int unsigned PC1 = $clog2(C1_OUT * 1 * KSIZE * KSIZE + C1_OUT);
  localparam int unsigned PP1 = $clog2(2 * C1_OUT);
  localparam int unsigned PC2 = $clog2(C2_OUT * C1_OUT * KSIZE * KSIZE + C2_OUT);
  localparam int unsigned PP2 = $clog2(2 * C2_OUT);
  localparam int unsigned PC3 = $clog2(C3_OUT * C2_OUT * KSIZE * KSIZE + C3_OUT);
  localparam int unsigned PF1 = $clog2(C3_OUT * F1_OUT + F1_OUT);
  localparam int unsigned PF2 = $clog2(F1_OUT * F2_OUT + F2_OUT);

  // ---------------- parameter load ----------------
  data_t cfg_q;
  logic [6:0] cfg_we;

  flp2fix #(.W(DATA_W), .F(FRAC_W)) u_cfg_cvt (.f(cfg.value), .q(cfg_q));

  always_comb begin
    cfg_we = '0;
    if (cfg_valid) cfg_we[cfg.layer] = 1'b1;
  end

  // ---------------- buffer link signals ----------------
  // bK: producer writes, consumer reads. Naming: wfree/we/wa/wd/wc, rr/ra/rd/rl
  logic b0_wfree, b0_we, b0_wc, b0_rr, b0_rl;
  logic [A0-1:0] b0_wa, b0_ra [LANES];
  data_t b0_wd, b0_rd [LANES];

  logic b1_wfree, b1_we, b1_wc, b1_rr, b1_rl;
  logic [A1-1:0] b1_wa, b1_ra [1];
  data_t b1_wd, b1_rd [1];

  logic b2_wfree, b2_we, b2_wc, b2_rr, b2_rl;
  logic [A2-1:0] b2_wa, b2_ra [LANES];
  data_t b2_wd, b2_rd [LANES];

  logic b3_wfree, b3_we, b3_wc, b3_rr, b3_rl;
  logic [A3-1:0] b3_wa, b3_ra [1];
  data_t b3_wd, b3_rd [1];

  logic b4_wfree, b4_we, b4_wc, b4_rr, b4_rl;
  logic [A4-1:0] b4_wa, b4_ra [LANES];
  data_t b4_wd, b4_rd [LANES];

  logic b5_wfree, b5_we, b5_wc, b5_rr, b5_rl;
  logic [A5-1:0] b5_wa, b5_ra [1];
  data_t b5_wd, b5_rd [1];

  logic b6_wfree, b6_we, b6_wc, b6_rr, b6_rl;
  logic [A6-1:0] b6_wa, b6_ra [1];
  data_t b6_wd, b6_rd [1];

  logic b7_wfree, b7_we, b7_wc, b7_rr, b7_rl;
  logic [A7-1:0] b7_wa, b7_ra [1];
  data_t b7_wd, b7_rd [1];

  // ---------------- input stage ----------------
  logic [A0-1:0] pix_cnt;
  data_t         pix_q;

  flp2fix #(.W(DATA_W), .F(FRAC_W)) u_pix_cvt (.f(pix_data), .q(pix_q));

  assign pix_ready = b0_wfree;
  assign b0_we     = pix_valid && pix_ready;
  assign b0_wa     = pix_cnt;
  assign b0_wd     = pix_q;
  assign b0_wc     = b0_we && (pix_cnt == A0'(N0 - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pix_cnt <= '0;
    else if (b0_we) pix_cnt <= b0_wc ? '0 : pix_cnt + 1'b1;
  end

  // ---------------- buffers ----------------
  pingpong_buf #(.W(DATA_W), .DEPTH(N0), .NRD(LANES)) u_b0 (
    .clk, .rst_n, .wr_free(b0_wfree), .wr_en(b0_we), .wr_addr(b0_wa), .wr_data(b0_wd),
    .wr_commit(b0_wc), .rd_ready(b0_rr), .rd_addr(b0_ra), .rd_data(b0_rd), .rd_release(b0_rl));
  pingpong_buf #(.W(DATA_W), .DEPTH(N1), .NRD(1)) u_b1 (
    .clk, .rst_n, .wr_free(b1_wfree), .wr_en(b1_we), .wr_addr(b1_wa), .wr_data(b1_wd),
    .wr_commit(b1_wc), .rd_ready(b1_rr), .rd_addr(b1_ra), .rd_data(b1_rd), .rd_release(b1_rl));
  pingpong_buf #(.W(DATA_W), .DEPTH(N2), .NRD(LANES)) u_b2 (
    .clk, .rst_n, .wr_free(b2_wfree), .wr_en(b2_we), .wr_addr(b2_wa), .wr_data(b2_wd),
    .wr_commit(b2_wc), .rd_ready(b2_rr), .rd_addr(b2_ra), .rd_data(b2_rd), .rd_release(b2_rl));
  pingpong_buf #(.W(DATA_W), .DEPTH(N3), .NRD(1)) u_b3 (
    .clk, .rst_n, .wr_free(b3_wfree), .wr_en(b3_we), .wr_addr(b3_wa), .wr_data(b3_wd),
    .wr_commit(b3_wc), .rd_ready(b3_rr), .rd_addr(b3_ra), .rd_data(b3_rd), .rd_release(b3_rl));
  pingpong_buf #(.W(DATA_W), .DEPTH(N4), .NRD(LANES)) u_b4 (
    .clk, .rst_n, .wr_free(b4_wfree), .wr_en(b4_we), .wr_addr(b4_wa), .wr_data(b4_wd),
    .wr_commit(b4_wc), .rd_ready(b4_rr), .rd_addr(b4_ra), .rd_data(b4_rd), .rd_release(b4_rl));
  pingpong_buf #(.W(DATA_W), .DEPTH(N5), .NRD(1)) u_b5 (
    .clk, .rst_n, .wr_free(b5_wfree), .wr_en(b5_we), .wr_addr(b5_wa), .wr_data(b5_wd),
    .wr_commit(b5_wc), .rd_ready(b5_rr), .rd_addr(b5_ra), .rd_data(b5_rd), .rd_release(b5_rl));
  pingpong_buf #(.W(DATA_W), .DEPTH(N6), .NRD(1)) u_b6 (
    .clk, .rst_n, .wr_free(b6_wfree), .wr_en(b6_we), .wr_addr(b6_wa), .wr_data(b6_wd),
    .wr_commit(b6_wc), .rd_ready(b6_rr), .rd_addr(b6_ra), .rd_data(b6_rd), .rd_release(b6_rl));
  pingpong_buf #(.W(DATA_W), .DEPTH(N7), .NRD(1)) u_b7 (
    .clk, .rst_n, .wr_free(b7_wfree), .wr_en(b7_we), .wr_addr(b7_wa), .wr_data(b7_wd),
    .wr_commit(b7_wc), .rd_ready(b7_rr), .rd_addr(b7_ra), .rd_data(b7_rd), .rd_release(b7_rl));

  // ---------------- layers ----------------
  conv_layer #(.CIN(1), .COUT(C1_OUT), .IH(IMG_H), .IW(IMG_W), .K(KSIZE),
               .LANES(LANES), .MODE(CONV_MODE)) u_conv1 (
    .clk, .rst_n,
    .cfg_we(cfg_we[L_CONV1]), .cfg_addr(cfg.addr[PC1-1:0]), .cfg_data(cfg_q),
    .in_ready(b0_rr), .in_addr(b0_ra), .in_data(b0_rd), .in_release(b0_rl),
    .out_free(b1_wfree), .out_we(b1_we), .out_addr(b1_wa), .out_data(b1_wd), .out_commit(b1_wc),
    .busy(layer_busy[0]));

  pool_layer #(.C(C1_OUT), .IH(C1H), .IW(C1H)) u_pool1 (
    .clk, .rst_n,
    .cfg_we(cfg_we[L_POOL1]), .cfg_addr(cfg.addr[PP1-1:0]), .cfg_data(cfg_q),
    .in_ready(b1_rr), .in_addr(b1_ra), .in_data(b1_rd), .in_release(b1_rl),
    .out_free(b2_wfree), .out_we(b2_we), .out_addr(b2_wa), .out_data(b2_wd), .out_commit(b2_wc),
    .busy(layer_busy[1]));

  conv_layer #(.CIN(C1_OUT), .COUT(C2_OUT), .IH(P1H), .IW(P1H), .K(KSIZE),
               .LANES(LANES), .MODE(CONV_MODE)) u_conv2 (
    .clk, .rst_n,
    .cfg_we(cfg_we[L_CONV2]), .cfg_addr(cfg.addr[PC2-1:0]), .cfg_data(cfg_q),
    .in_ready(b2_rr), .in_addr(b2_ra), .in_data(b2_rd), .in_release(b2_rl),
    .out_free(b3_wfree), .out_we(b3_we), .out_addr(b3_wa), .out_data(b3_wd), .out_commit(b3_wc),
    .busy(layer_busy[2]));

  pool_layer #(.C(C2_OUT), .IH(C2H), .IW(C2H)) u_pool2 (
    .clk, .rst_n,
    .cfg_we(cfg_we[L_POOL2]), .cfg_addr(cfg.addr[PP2-1:0]), .cfg_data(cfg_q),
    .in_ready(b3_rr), .in_addr(b3_ra), .in_data(b3_rd), .in_release(b3_rl),
    .out_free(b4_wfree), .out_we(b4_we), .out_addr(b4_wa), .out_data(b4_wd), .out_commit(b4_wc),
    .busy(layer_busy[3]));

  conv_layer #(.CIN(C2_OUT), .COUT(C3_OUT), .IH(P2H), .IW(P2H), .K(KSIZE),
               .LANES(LANES), .MODE(CONV_MODE)) u_conv3 (
    .clk, .rst_n,
    .cfg_we(cfg_we[L_CONV3]), .cfg_addr(cfg.addr[PC3-1:0]), .cfg_data(cfg_q),
    .in_ready(b4_rr), .in_addr(b4_ra), .in_data(b4_rd), .in_release(b4_rl),
    .out_free(b5_wfree), .out_we(b5_we), .out_addr(b5_wa), .out_data(b5_wd), .out_commit(b5_wc),
    .busy(layer_busy[4]));

  fc_layer #(.NIN(C3_OUT), .NOUT(F1_OUT), .MODE(FC_MODE)) u_fc1 (
    .clk, .rst_n,
    .cfg_we(cfg_we[L_FC1]), .cfg_addr(cfg.addr[PF1-1:0]), .cfg_data(cfg_q),
    .in_ready(b5_rr), .in_addr(b5_ra), .in_data(b5_rd), .in_release(b5_rl),
    .out_free(b6_wfree), .out_we(b6_we), .out_addr(b6_wa), .out_data(b6_wd), .out_commit(b6_wc),
    .busy(layer_busy[5]));

  fc_layer #(.NIN(F1_OUT), .NOUT(F2_OUT), .MODE(FC_MODE)) u_fc2 (
    .clk, .rst_n,
    .cfg_we(cfg_we[L_FC2]), .cfg_addr(cfg.addr[PF2-1:0]), .cfg_data(cfg_q),
    .in_ready(b6_rr), .in_addr(b6_ra), .in_data(b6_rd), .in_release(b6_rl),
    .out_free(b7_wfree), .out_we(b7_we), .out_addr(b7_wa), .out_data(b7_wd), .out_commit(b7_wc),
    .busy(layer_busy[6]));

  // ---------------- output stage ----------------
  // Reads the ten scores of a committed bank one by one, converts each to
  // a float and holds it on res_data until the consumer takes it. O_READ
  // is the cycle in which the registered buffer read of score oidx is in
  // flight; in O_SEND the word sits on the buffer's read port.
  typedef enum logic [1:0] {O_IDLE, O_READ, O_SEND} ostate_e;
  ostate_e        ost;
  logic [A7-1:0]  oidx;

  assign b7_ra[0] = oidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ost   <= O_IDLE;
      oidx  <= '0;
    end else begin
      unique case (ost)
        O_IDLE: if (b7_rr) begin oidx <= '0; ost <= O_READ; end
        O_READ: ost <= O_SEND;                   // registered read in flight
        O_SEND: if (res_ready) begin
                  if (oidx == A7'(N7 - 1)) ost <= O_IDLE;
                  else begin oidx <= oidx + 1'b1; ost <= O_READ; end
                end
        default: ost <= O_IDLE;
      endcase
    end
  end

  fix2flp #(.W(DATA_W), .F(FRAC_W)) u_res_cvt (.q(b7_rd[0]), .f(res_data));

  assign res_valid = (ost == O_SEND);
  assign res_idx   = 4'(oidx);
  assign res_last  = (oidx == A7'(N7 - 1));
  assign b7_rl     = (ost == O_SEND) && res_ready && res_last;

  // A stalled score must stay put until it is taken.
  logic        held_q;
  logic [31:0] held_data_q;
  logic [3:0]  held_idx_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_q      <= 1'b0;
      held_data_q <= '0;
      held_idx_q  <= '0;
    end else begin
      held_q      <= res_valid && !res_ready;
      held_data_q <= res_data;
      held_idx_q  <= res_idx;
      if (held_q)
        a_res_stable: assert (res_valid && res_data == held_data_q && res_idx == held_idx_q)
          else $error("lenet5_top: score changed while stalled");
    end
  end

endmodule
