// tb_approx_mac: checks the approximate MAC in all three reduction modes
// with one lane, and the rounded and carry modes with five lanes (adder
// tree). Random accumulations of 1..12 beats, each started from a random
// bias, are compared with an integer model: round toward zero, floor plus
// sign carry, or floor, each followed by 12-bit wrap-around addition.
// Also checks that out_valid appears exactly one cycle after the last beat.
module tb_approx_mac;
  import lenet5_pkg::*;
  import tb_ref_pkg::*;

  localparam int NDUT = 5;
  localparam int L5   = 5;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, first, last;
  acc_t  init;
  data_t a [L5], b [L5];
  logic  ov [NDUT];
  acc_t  oa [NDUT];
  int checks = 0, failures = 0;
  int rounding_events = 0, carry_events = 0;

  always #5 clk = !clk;

  approx_mac #(.LANES(1), .MODE(MAC_ROUNDED)) d0 (.clk, .rst_n, .in_valid, .first, .last, .init,
    .a(a[0:0]), .b(b[0:0]), .out_valid(ov[0]), .out_acc(oa[0]));
  approx_mac #(.LANES(1), .MODE(MAC_CARRY))   d1 (.clk, .rst_n, .in_valid, .first, .last, .init,
    .a(a[0:0]), .b(b[0:0]), .out_valid(ov[1]), .out_acc(oa[1]));
  approx_mac #(.LANES(1), .MODE(MAC_TRUNC))   d2 (.clk, .rst_n, .in_valid, .first, .last, .init,
    .a(a[0:0]), .b(b[0:0]), .out_valid(ov[2]), .out_acc(oa[2]));
  approx_mac #(.LANES(L5), .MODE(MAC_ROUNDED)) d3 (.clk, .rst_n, .in_valid, .first, .last, .init,
    .a(a), .b(b), .out_valid(ov[3]), .out_acc(oa[3]));
  approx_mac #(.LANES(L5), .MODE(MAC_CARRY))   d4 (.clk, .rst_n, .in_valid, .first, .last, .init,
    .a(a), .b(b), .out_valid(ov[4]), .out_acc(oa[4]));

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_acc [NDUT];
    int mode_of [NDUT] = '{0, 1, 2, 0, 1};
    int lanes_of [NDUT] = '{1, 1, 1, 5, 5};
    int nbeats;
    in_valid = 0; first = 0; last = 0; init = '0;
    for (int l = 0; l < L5; l++) begin a[l] = '0; b[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      nbeats = $urandom_range(1, 12);
      init = acc_t'($urandom_range(0, 255) - 128);
      for (int d = 0; d < NDUT; d++) exp_acc[d] = int'(init);
      for (int k = 0; k < nbeats; k++) begin
        // idle cycles between beats must not disturb the sum
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk); in_valid = 0;
          @(posedge clk);
        end
        @(negedge clk);
        in_valid = 1; first = (k == 0); last = (k == nbeats - 1);
        for (int l = 0; l < L5; l++) begin
          a[l] = data_t'($urandom_range(0, 255));
          b[l] = data_t'($urandom_range(0, 255));
          if ((int'(a[l]) * int'(b[l])) % 64 != 0 && int'(a[l]) * int'(b[l]) < 0) rounding_events++;
        end
        for (int d = 0; d < NDUT; d++)
          for (int l = 0; l < lanes_of[d]; l++)
            exp_acc[d] = wrap(exp_acc[d] + ref_reduce(int'(a[l]), int'(b[l]), mode_of[d]), 12);
        if (ref_reduce(int'(a[0]), int'(b[0]), 1) != ref_reduce(int'(a[0]), int'(b[0]), 2)) carry_events++;
        @(posedge clk);
        #1;
        for (int d = 0; d < NDUT; d++) begin
          checks++;
          if (ov[d] !== last) begin
            failures++;
            $display("FAIL dut%0d out_valid=%0b expected %0b", d, ov[d], last);
          end
        end
      end
      @(negedge clk); in_valid = 0; first = 0; last = 0;
      for (int d = 0; d < NDUT; d++) begin
        checks++;
        if (int'(oa[d]) != exp_acc[d]) begin
          failures++;
          $display("FAIL dut%0d trans %0d: got %0d expected %0d", d, t, oa[d], exp_acc[d]);
        end
      end
    end
    checks++;
    if (rounding_events == 0 || carry_events == 0) begin
      failures++;
      $display("FAIL no rounding/carry events exercised");
    end
    $display("rounding events %0d, carry events %0d", rounding_events, carry_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
