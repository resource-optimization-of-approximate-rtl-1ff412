// tb_pool_layer: checks the subsampling layer at a reduced size (2 maps of
// 6x6 -> 3x3). The testbench models the input buffer and captures the
// output buffer; each output is compared with an integer model: exact sum
// of the 2x2 window, floor division by 4, product with the map weight
// shortened by 6 bits (floor), bias added with 12-bit wrap, then tanh.
// Also checks the wait for a free output bank, one commit and one release
// per image, and 4*C*OH*OW + 2 cycles from start to commit.
module tb_pool_layer;
  import lenet5_pkg::*;
  import tb_ref_pkg::*;

  localparam int C = 2, IH = 6, IW = 6, OH = 3, OW = 3;
  localparam int NP = 2 * C, IN_N = C * IH * IW, OUT_N = C * OH * OW;
  localparam int PAW = $clog2(NP), IAW = $clog2(IN_N), OAW = $clog2(OUT_N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic cfg_we, in_ready, in_release, out_free, out_we, out_commit, busy;
  logic [PAW-1:0] cfg_addr;
  data_t cfg_data;
  logic [IAW-1:0] in_addr [1];
  data_t in_data [1];
  logic [OAW-1:0] out_addr;
  data_t out_data;

  data_t inmem [IN_N];
  data_t pmem [NP];
  data_t outmem [OUT_N];
  int commits = 0, releases = 0;
  int checks = 0, failures = 0;

  pool_layer #(.C(C), .IH(IH), .IW(IW)) dut (.*);

  always @(posedge clk) begin
    in_data[0] <= inmem[in_addr[0]];
    if (out_we) outmem[out_addr] <= out_data;
    if (rst_n && out_commit) commits <= commits + 1;
    if (rst_n && in_release) begin
      releases <= releases + 1;
      in_ready <= 1'b0;
    end
  end

  function automatic int ref_out(int c, int oy, int ox);
    int s, avg, sc, pre;
    s = 0;
    for (int d = 0; d < 4; d++) s += int'(inmem[(c * IH + 2 * oy + d / 2) * IW + 2 * ox + d % 2]);
    avg = floordiv(s, 4);
    sc  = wrap(floordiv(avg * int'(pmem[c]), 64), 12);
    pre = wrap(sc + int'(pmem[C + c]), 12);
    return ref_tanh(pre);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    cfg_we = 0; cfg_addr = '0; cfg_data = '0; out_free = 0; in_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NP; i++) begin
      @(negedge clk);
      pmem[i] = data_t'($urandom_range(0, 255));
      cfg_we = 1; cfg_addr = PAW'(i); cfg_data = pmem[i];
    end
    @(negedge clk); cfg_we = 0;
    for (int img = 0; img < 4; img++) begin
      for (int i = 0; i < IN_N; i++) inmem[i] = data_t'($urandom_range(0, 255));
      @(negedge clk); in_ready = 1;
      repeat (10) begin
        @(negedge clk);
        checks++;
        if (busy || out_we) begin failures++; $display("FAIL started without a free bank"); end
      end
      out_free = 1;
      t0 = int'($time / 10);
      @(posedge clk iff out_commit);
      t1 = int'($time / 10);
      @(negedge clk); out_free = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (t1 - t0 != 4 * OUT_N + 2) begin
        failures++; $display("FAIL took %0d cycles, expected %0d", t1 - t0, 4 * OUT_N + 2);
      end
      checks++;
      if (commits != img + 1 || releases != img + 1) begin
        failures++; $display("FAIL commits %0d releases %0d", commits, releases);
      end
      for (int c = 0; c < C; c++)
        for (int oy = 0; oy < OH; oy++)
          for (int ox = 0; ox < OW; ox++) begin
            checks++;
            if (int'(outmem[(c * OH + oy) * OW + ox]) != ref_out(c, oy, ox)) begin
              failures++;
              $display("FAIL img %0d out[%0d][%0d][%0d]=%0d expected %0d", img, c, oy, ox,
                       outmem[(c * OH + oy) * OW + ox], ref_out(c, oy, ox));
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
