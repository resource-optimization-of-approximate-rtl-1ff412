// lenet5_tb_driver: stimulus and checker for the whole accelerator.
//
// Generates clock and reset, loads random weights and biases as floats
// through the parameter bus, then streams NIMG random 32x32 images back to
// back into the pixel port while draining the score port with random
// back-pressure. An integer model of the complete network (same number
// formats, reductions and tanh rounding, written independently of the RTL)
// predicts the ten Q2.6 scores of each image; every score must match
// exactly after float conversion, in order, with the right class index.
//
// It also measures the latency of the first image (last pixel accepted to
// first score) and the spacing of results in steady state, and counts the
// mechanisms of the design, each of which must occur at least once:
// layer overlap (two or more layers busy at once), input stall (both input
// banks full), output back-pressure, float-to-fixed floor events, tanh
// saturation, and the rounding/carry events of the approximate MAC.
// The watchdog lives in the testbench that instantiates this driver.
module lenet5_tb_driver
  import lenet5_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int unsigned LANES = 1,
  parameter mac_mode_e   MODE  = MAC_ROUNDED,
  parameter int          NIMG  = 3
) (
  output logic        clk,
  output logic        rst_n,
  output logic        cfg_valid,
  output cfg_wr_t     cfg,
  output logic        pix_valid,
  input  logic        pix_ready,
  output logic [31:0] pix_data,
  input  logic        res_valid,
  output logic        res_ready,
  input  logic [31:0] res_data,
  input  logic [3:0]  res_idx,
  input  logic        res_last,
  input  logic [6:0]  layer_busy
);

  localparam int MI = (MODE == MAC_ROUNDED) ? 0 : (MODE == MAC_CARRY) ? 1 : 2;
  // parameters per layer: count of weights, count of biases
  localparam int NWT [7] = '{6*25, 6, 16*6*25, 16, 120*16*25, 120*84, 84*10};
  localparam int NBS [7] = '{6, 6, 16, 16, 120, 84, 10};
  localparam int PMAX = 120*16*25 + 120;
  // beats per layer and image
  localparam int BEATS [7] = '{4704*25/LANES, 4704, 1600*150/LANES, 1600, 120*400/LANES, 10080, 840};

  int pq [7][PMAX];            // parameters in Q2.6 (value*64)
  int img [NIMG][1024];        // pixels in Q2.6
  logic [31:0] img_f [NIMG][1024];
  int expect_q [NIMG][10];

  int checks = 0, failures = 0;
  int cnt_overlap = 0, cnt_in_stall = 0, cnt_out_bp = 0, cnt_floor = 0;
  int cnt_sat = 0, cnt_approx = 0;
  longint cyc = 0;
  longint t_last_pix [NIMG], t_first_res [NIMG];

  initial clk = 1'b0;
  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference model ----------------
  function automatic int mac_red(int a, int b, int mode);
    int r;
    r = ref_reduce(a, b, mode);
    if (mode != 2 && r != ref_reduce(a, b, 2)) cnt_approx++;
    return r;
  endfunction

  function automatic int act(int acc);
    int y;
    y = ref_tanh(acc);
    if (y == 64 || y == -64) cnt_sat++;
    return y;
  endfunction

  task automatic ref_net(int n);
    int c1 [6*28*28], p1 [6*14*14], c2 [16*10*10], p2 [16*5*5], c3 [120], f1 [84];
    int acc, s;
    // Conv1
    for (int co = 0; co < 6; co++)
      for (int y = 0; y < 28; y++)
        for (int x = 0; x < 28; x++) begin
          acc = pq[0][NWT[0] + co];
          for (int ky = 0; ky < 5; ky++)
            for (int kx = 0; kx < 5; kx++)
              acc = wrap(acc + mac_red(img[n][(y + ky) * 32 + x + kx], pq[0][(co * 5 + ky) * 5 + kx], MI), 12);
          c1[(co * 28 + y) * 28 + x] = act(acc);
        end
    // Pool1
    for (int c = 0; c < 6; c++)
      for (int y = 0; y < 14; y++)
        for (int x = 0; x < 14; x++) begin
          s = c1[(c*28 + 2*y)*28 + 2*x] + c1[(c*28 + 2*y)*28 + 2*x + 1]
            + c1[(c*28 + 2*y + 1)*28 + 2*x] + c1[(c*28 + 2*y + 1)*28 + 2*x + 1];
          acc = wrap(floordiv(floordiv(s, 4) * pq[1][c], 64), 12);
          p1[(c * 14 + y) * 14 + x] = act(wrap(acc + pq[1][6 + c], 12));
        end
    // Conv2
    for (int co = 0; co < 16; co++)
      for (int y = 0; y < 10; y++)
        for (int x = 0; x < 10; x++) begin
          acc = pq[2][NWT[2] + co];
          for (int ci = 0; ci < 6; ci++)
            for (int ky = 0; ky < 5; ky++)
              for (int kx = 0; kx < 5; kx++)
                acc = wrap(acc + mac_red(p1[(ci * 14 + y + ky) * 14 + x + kx],
                                         pq[2][((co * 6 + ci) * 5 + ky) * 5 + kx], MI), 12);
          c2[(co * 10 + y) * 10 + x] = act(acc);
        end
    // Pool2
    for (int c = 0; c < 16; c++)
      for (int y = 0; y < 5; y++)
        for (int x = 0; x < 5; x++) begin
          s = c2[(c*10 + 2*y)*10 + 2*x] + c2[(c*10 + 2*y)*10 + 2*x + 1]
            + c2[(c*10 + 2*y + 1)*10 + 2*x] + c2[(c*10 + 2*y + 1)*10 + 2*x + 1];
          acc = wrap(floordiv(floordiv(s, 4) * pq[3][c], 64), 12);
          p2[(c * 5 + y) * 5 + x] = act(wrap(acc + pq[3][16 + c], 12));
        end
    // Conv3
    for (int co = 0; co < 120; co++) begin
      acc = pq[4][NWT[4] + co];
      for (int ci = 0; ci < 16; ci++)
        for (int k = 0; k < 25; k++)
          acc = wrap(acc + mac_red(p2[ci * 25 + k], pq[4][(co * 16 + ci) * 25 + k], MI), 12);
      c3[co] = act(acc);
    end
    // FC1, FC2 (plain truncation)
    for (int o = 0; o < 84; o++) begin
      acc = pq[5][NWT[5] + o];
      for (int i = 0; i < 120; i++) acc = wrap(acc + ref_reduce(c3[i], pq[5][o * 120 + i], 2), 12);
      f1[o] = act(acc);
    end
    for (int o = 0; o < 10; o++) begin
      acc = pq[6][NWT[6] + o];
      for (int i = 0; i < 84; i++) acc = wrap(acc + ref_reduce(f1[i], pq[6][o * 84 + i], 2), 12);
      expect_q[n][o] = act(acc);
    end
  endtask

  // A float just above the grid point k/64, so that the conversion has
  // bits to drop; returns its bit pattern and the Q2.6 value it maps to.
  function automatic logic [31:0] make_float(int k, output int q);
    real r;
    logic [31:0] b;
    r = (real'(k) + real'($urandom_range(1, 999)) / 1000.0) / 64.0;
    b = real_to_bits(r);
    q = ref_to_q26(bits_to_real(b));
    if (real'(q) != bits_to_real(b) * 64.0) cnt_floor++;
    return b;
  endfunction

  // layer overlap: two or more layers busy in the same cycle
  always @(posedge clk) begin
    if (rst_n && $countones(layer_busy) >= 2) cnt_overlap++;
    if (rst_n && pix_valid && !pix_ready) cnt_in_stall++;
    if (rst_n && res_valid && !res_ready) cnt_out_bp++;
  end

  // ---------------- stimulus ----------------
  initial begin
    int q, range_k [7], bias_k;
    rst_n = 1'b0; cfg_valid = 1'b0; cfg = '0; pix_valid = 1'b0; pix_data = '0;
    // weight magnitudes (in 1/64 steps) chosen to keep sums in range
    range_k = '{24, 0, 6, 0, 3, 6, 12};
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // configuration
    for (int l = 0; l < 7; l++)
      for (int i = 0; i < NWT[l] + NBS[l]; i++) begin
        logic [31:0] b;
        int k;
        if (i >= NWT[l] && l == 0)       k = $urandom_range(0, 255) - 128; // Conv1 bias, full range
        else if (i >= NWT[l])            k = $urandom_range(0, 31) - 16;   // bias
        else if (l == 1 || l == 3)       k = $urandom_range(64, 120);      // pooling scale
        else                             k = $urandom_range(0, 2 * range_k[l]) - range_k[l];
        b = make_float(k, q);
        pq[l][i] = q;
        @(negedge clk);
        cfg_valid = 1'b1;
        cfg.layer = layer_e'(l);
        cfg.addr  = 16'(i);
        cfg.value = b;
      end
    @(negedge clk); cfg_valid = 1'b0;
    // images and their expected scores
    for (int n = 0; n < NIMG; n++) begin
      for (int p = 0; p < 1024; p++) begin
        img_f[n][p] = make_float($urandom_range(0, 63), q);
        img[n][p] = q;
      end
      ref_net(n);
    end
    // stream all images back to back
    for (int n = 0; n < NIMG; n++)
      for (int p = 0; p < 1024; p++) begin
        @(negedge clk);
        pix_valid = 1'b1;
        pix_data  = img_f[n][p];
        @(posedge clk iff pix_ready);
        if (p == 1023) t_last_pix[n] = cyc;
      end
    @(negedge clk); pix_valid = 1'b0;
  end

  // ---------------- result checking ----------------
  initial begin
    int got;
    res_ready = 1'b0;
    @(posedge rst_n);
    for (int n = 0; n < NIMG; n++)
      for (int o = 0; o < 10; o++) begin
        @(negedge clk);
        res_ready = ($urandom_range(0, 2) != 0);
        while (!(res_valid && res_ready)) begin
          @(negedge clk);
          res_ready = ($urandom_range(0, 2) != 0);
        end
        if (o == 0) t_first_res[n] = cyc;
        got = int'($floor(bits_to_real(res_data) * 64.0));
        checks++;
        if (got != expect_q[n][o] || int'(res_idx) != o || res_last != (o == 9)) begin
          failures++;
          $display("FAIL image %0d class %0d (idx %0d last %0b): got %0d/64 expected %0d/64",
                   n, o, res_idx, res_last, got, expect_q[n][o]);
        end
      end
    @(negedge clk); res_ready = 1'b0;
    report();
  end

  task automatic report();
    longint lat, gap, sum_beats, slowest;
    sum_beats = 0; slowest = 0;
    for (int l = 0; l < 7; l++) begin
      sum_beats += longint'(BEATS[l]);
      if (longint'(BEATS[l]) > slowest) slowest = longint'(BEATS[l]);
    end
    lat = t_first_res[0] - t_last_pix[0];
    $display("latency of image 0: %0d cycles (sum of layer beats %0d)", lat, sum_beats);
    checks++;
    if (lat < sum_beats || lat > sum_beats + 60) begin
      failures++; $display("FAIL latency outside [%0d, %0d]", sum_beats, sum_beats + 60);
    end
    if (LANES == 1) begin
      // per-image cycle count reported for the approximate-MAC accelerator
      checks++;
      if (lat < 432610 * 97 / 100 || lat > 432610 * 103 / 100) begin
        failures++; $display("FAIL latency not within 3%% of 432610 cycles");
      end
    end
    if (NIMG >= 3) begin
      gap = t_first_res[2] - t_first_res[1];
      $display("result spacing in steady state: %0d cycles (slowest layer %0d beats)", gap, slowest);
      checks++;
      if (gap < slowest || gap > slowest + 8) begin
        failures++; $display("FAIL spacing outside [%0d, %0d]", slowest, slowest + 8);
      end
    end
    $display("events: overlap=%0d in_stall=%0d out_backpressure=%0d float_floor=%0d tanh_sat=%0d approx_mac=%0d",
             cnt_overlap, cnt_in_stall, cnt_out_bp, cnt_floor, cnt_sat, cnt_approx);
    checks++;
    if (cnt_overlap == 0 || cnt_in_stall == 0 || cnt_out_bp == 0 || cnt_floor == 0 ||
        cnt_sat == 0 || (MI != 2 && cnt_approx == 0)) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
