// tb_flp2fix: checks the float-to-Q2.6 converter against a real-number
// model (floor of value*64, saturated to 8 bits) for random values in and
// beyond the Q2.6 range, exact multiples of 1/64, and the special values
// zero, subnormal, infinity and NaN.
module tb_flp2fix;
  import tb_ref_pkg::*;

  logic [31:0]       f;
  logic signed [7:0] q;
  int checks = 0, failures = 0;

  flp2fix #(.W(8), .F(6)) dut (.f(f), .q(q));

  task automatic check(logic [31:0] bits, int expect_q, string what);
    f = bits;
    #1;
    checks++;
    if (int'(q) != expect_q) begin
      failures++;
      $display("FAIL %s: f=%h got %0d expected %0d", what, bits, q, expect_q);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    // exact grid values over the whole range
    for (int k = -128; k <= 127; k++) check(real_to_bits(real'(k) / 64.0), k, "grid");
    // random values with bits below the grid
    for (int n = 0; n < 3000; n++) begin
      r = (real'($urandom_range(0, 2000000)) - 1000000.0) / 250000.0;   // -4 .. 4
      check(real_to_bits(r), ref_to_q26(bits_to_real(real_to_bits(r))), "random");
    end
    // large and tiny magnitudes
    check(real_to_bits(1000.0), 127, "large+");
    check(real_to_bits(-1000.0), -128, "large-");
    check(real_to_bits(1.0e-9), 0, "tiny+");
    check(real_to_bits(-1.0e-9), -1, "tiny-");
    check(32'h0000_0000, 0, "zero");
    check(32'h8000_0000, 0, "-zero");
    check(32'h0000_0100, 0, "subnormal");
    check(32'h7F80_0000, 127, "+inf");
    check(32'hFF80_0000, -128, "-inf");
    check(32'h7FC0_0000, 0, "nan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
