// tb_fc_layer: checks the fully connected layer at a reduced size (9
// inputs, 4 outputs) with the default truncating 12-bit arithmetic. Every
// output is compared with an integer model: bias plus the sum of products
// each shortened by 6 bits (floor), 12-bit wrap, then tanh. Also checks the
// wait for a free output bank, one commit and one release per vector, and
// NOUT*NIN + 2 cycles from start to commit.
module tb_fc_layer;
  import lenet5_pkg::*;
  import tb_ref_pkg::*;

  localparam int NIN = 9, NOUT = 4;
  localparam int NW = NIN * NOUT, NP = NW + NOUT;
  localparam int PAW = $clog2(NP), IAW = $clog2(NIN), OAW = $clog2(NOUT);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic cfg_we, in_ready, in_release, out_free, out_we, out_commit, busy;
  logic [PAW-1:0] cfg_addr;
  data_t cfg_data;
  logic [IAW-1:0] in_addr [1];
  data_t in_data [1];
  logic [OAW-1:0] out_addr;
  data_t out_data;

  data_t inmem [NIN];
  data_t pmem [NP];
  data_t outmem [NOUT];
  int commits = 0, releases = 0;
  int checks = 0, failures = 0;

  fc_layer #(.NIN(NIN), .NOUT(NOUT)) dut (.*);

  always @(posedge clk) begin
    in_data[0] <= inmem[in_addr[0]];
    if (out_we) outmem[out_addr] <= out_data;
    if (rst_n && out_commit) commits <= commits + 1;
    if (rst_n && in_release) begin
      releases <= releases + 1;
      in_ready <= 1'b0;
    end
  end

  function automatic int ref_out(int o);
    int acc;
    acc = int'(pmem[NW + o]);
    for (int i = 0; i < NIN; i++) acc = wrap(acc + ref_reduce(int'(inmem[i]), int'(pmem[o * NIN + i]), 2), 12);
    return ref_tanh(acc);
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
      pmem[i] = data_t'($urandom_range(0, 127) - 64);
      cfg_we = 1; cfg_addr = PAW'(i); cfg_data = pmem[i];
    end
    @(negedge clk); cfg_we = 0;
    for (int v = 0; v < 6; v++) begin
      for (int i = 0; i < NIN; i++) inmem[i] = data_t'($urandom_range(0, 255));
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
      if (t1 - t0 != NOUT * NIN + 2) begin
        failures++; $display("FAIL took %0d cycles, expected %0d", t1 - t0, NOUT * NIN + 2);
      end
      checks++;
      if (commits != v + 1 || releases != v + 1) begin
        failures++; $display("FAIL commits %0d releases %0d", commits, releases);
      end
      for (int o = 0; o < NOUT; o++) begin
        checks++;
        if (int'(outmem[o]) != ref_out(o)) begin
          failures++;
          $display("FAIL vec %0d out[%0d]=%0d expected %0d", v, o, outmem[o], ref_out(o));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
