// tb_conv_layer: checks the convolution layer at a reduced size (2 input
// maps of 7x7, 3 output maps of 3x3, 5x5 kernel) in two configurations
// side by side: one product per cycle with the rounded MAC, and a whole
// kernel row per cycle (5 lanes) with the carry MAC. The testbench models
// the input buffer (registered reads) and captures the output buffer, and
// compares every output with an integer model of the layer. It also checks
// that a layer waits while its output buffer is not free, that it commits
// and releases exactly once per image, and that an image takes
// COUT*OH*OW*CIN*25/LANES + 2 cycles from start to commit.
module tb_conv_layer;
  import lenet5_pkg::*;
  import tb_ref_pkg::*;

  localparam int CIN = 2, COUT = 3, IH = 7, IW = 7, K = 5;
  localparam int OH = IH - K + 1, OW = IW - K + 1;
  localparam int NW = COUT * CIN * K * K, NP = NW + COUT;
  localparam int IN_N = CIN * IH * IW, OUT_N = COUT * OH * OW;
  localparam int PAW = $clog2(NP), IAW = $clog2(IN_N), OAW = $clog2(OUT_N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic cfg_we;
  logic [PAW-1:0] cfg_addr;
  data_t cfg_data;
  logic in_ready [2], in_release [2], out_free, out_we [2], out_commit [2], busy [2];
  logic [IAW-1:0] a1_addr [1], a5_addr [5];
  data_t a1_data [1], a5_data [5];
  logic [OAW-1:0] out_addr [2];
  data_t out_data [2];

  data_t inmem [IN_N];
  data_t pmem [NP];
  data_t outmem [2][OUT_N];
  int commits [2], releases [2];
  int checks = 0, failures = 0;

  conv_layer #(.CIN(CIN), .COUT(COUT), .IH(IH), .IW(IW), .K(K), .LANES(1), .MODE(MAC_ROUNDED)) dut1 (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data,
    .in_ready(in_ready[0]), .in_addr(a1_addr), .in_data(a1_data), .in_release(in_release[0]),
    .out_free, .out_we(out_we[0]), .out_addr(out_addr[0]), .out_data(out_data[0]),
    .out_commit(out_commit[0]), .busy(busy[0]));

  conv_layer #(.CIN(CIN), .COUT(COUT), .IH(IH), .IW(IW), .K(K), .LANES(5), .MODE(MAC_CARRY)) dut5 (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data,
    .in_ready(in_ready[1]), .in_addr(a5_addr), .in_data(a5_data), .in_release(in_release[1]),
    .out_free, .out_we(out_we[1]), .out_addr(out_addr[1]), .out_data(out_data[1]),
    .out_commit(out_commit[1]), .busy(busy[1]));

  // input buffer model: registered reads
  always @(posedge clk) begin
    a1_data[0] <= inmem[a1_addr[0]];
    for (int l = 0; l < 5; l++) a5_data[l] <= inmem[a5_addr[l]];
  end

  // output capture and handshake bookkeeping
  always @(posedge clk) begin
    for (int d = 0; d < 2; d++) begin
      if (out_we[d]) outmem[d][out_addr[d]] <= out_data[d];
      if (rst_n && out_commit[d]) commits[d] <= commits[d] + 1;
      if (rst_n && in_release[d]) begin
        releases[d] <= releases[d] + 1;
        in_ready[d] <= 1'b0;           // the buffer bank is given back
      end
    end
  end

  function automatic int ref_out(int mode, int co, int oy, int ox);
    int acc;
    acc = int'(pmem[NW + co]);
    for (int ci = 0; ci < CIN; ci++)
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++)
          acc = wrap(acc + ref_reduce(int'(inmem[(ci * IH + oy + ky) * IW + ox + kx]),
                                      int'(pmem[((co * CIN + ci) * K + ky) * K + kx]), mode), 12);
    return ref_tanh(acc);
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, tdone [2];
    int expect_cycles [2];
    expect_cycles[0] = OUT_N * CIN * K * K + 2;
    expect_cycles[1] = OUT_N * CIN * K * K / 5 + 2;
    cfg_we = 0; cfg_addr = '0; cfg_data = '0; out_free = 0;
    in_ready[0] = 0; in_ready[1] = 0;
    commits = '{0, 0}; releases = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load weights (about +-0.5) and biases
    for (int i = 0; i < NP; i++) begin
      @(negedge clk);
      pmem[i] = data_t'($urandom_range(0, 63) - 32);
      cfg_we = 1; cfg_addr = PAW'(i); cfg_data = pmem[i];
    end
    @(negedge clk); cfg_we = 0;
    for (int img = 0; img < 3; img++) begin
      for (int i = 0; i < IN_N; i++)
        inmem[i] = data_t'(img == 2 ? $urandom_range(0, 255) : $urandom_range(0, 127) - 64);
      // input ready but output buffer full: the layers must wait
      @(negedge clk); in_ready[0] = 1; in_ready[1] = 1;
      repeat (20) begin
        @(negedge clk);
        checks++;
        if (busy[0] || busy[1] || out_we[0] || out_we[1]) begin
          failures++;
          $display("FAIL layer started without a free output bank");
        end
      end
      out_free = 1;
      t0 = int'($time / 10);
      fork
        begin @(posedge clk iff out_commit[0]); tdone[0] = int'($time / 10); end
        begin @(posedge clk iff out_commit[1]); tdone[1] = int'($time / 10); end
      join
      @(negedge clk); out_free = 0;
      repeat (3) @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        checks++;
        if (tdone[d] - t0 != expect_cycles[d]) begin
          failures++;
          $display("FAIL dut%0d took %0d cycles, expected %0d", d, tdone[d] - t0, expect_cycles[d]);
        end
        checks++;
        if (commits[d] != img + 1 || releases[d] != img + 1) begin
          failures++;
          $display("FAIL dut%0d commits %0d releases %0d", d, commits[d], releases[d]);
        end
        for (int co = 0; co < COUT; co++)
          for (int oy = 0; oy < OH; oy++)
            for (int ox = 0; ox < OW; ox++) begin
              checks++;
              if (int'(outmem[d][(co * OH + oy) * OW + ox]) != ref_out(d == 0 ? 0 : 1, co, oy, ox)) begin
                failures++;
                $display("FAIL dut%0d img %0d out[%0d][%0d][%0d]=%0d expected %0d", d, img, co, oy, ox,
                         outmem[d][(co * OH + oy) * OW + ox], ref_out(d == 0 ? 0 : 1, co, oy, ox));
              end
            end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
