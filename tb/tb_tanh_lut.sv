// tb_tanh_lut: exhaustive check of the tanh table. For every 12-bit Q6.6
// input the Q2.6 output must equal round(64*tanh(x)), with tanh computed
// from the exponential; inputs far outside -4..4 must give +-1 (+-64).
module tb_tanh_lut;
  import lenet5_pkg::*;
  import tb_ref_pkg::*;

  acc_t  x;
  data_t y;
  int checks = 0, failures = 0;

  tanh_lut dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -2048; k <= 2047; k++) begin
      x = acc_t'(k);
      #1;
      checks++;
      if (int'(y) != ref_tanh(k)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d expected %0d", k, y, ref_tanh(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
