// tb_fix2flp: exhaustive check of the fixed-to-float converter for the
// 8-bit Q2.6 and 12-bit Q6.6 formats. Every input code must convert to
// exactly code/64, and zero to the all-zero pattern.
module tb_fix2flp;
  import tb_ref_pkg::*;

  logic signed [7:0]  q8;
  logic signed [11:0] q12;
  logic [31:0]        f8, f12;
  int checks = 0, failures = 0;

  fix2flp #(.W(8),  .F(6)) dut8  (.q(q8),  .f(f8));
  fix2flp #(.W(12), .F(6)) dut12 (.q(q12), .f(f12));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -128; k <= 127; k++) begin
      q8 = 8'(k);
      #1;
      checks++;
      if (bits_to_real(f8) != real'(k) / 64.0 || (k == 0 && f8 != 32'd0)) begin
        failures++;
        $display("FAIL W=8 q=%0d f=%h", k, f8);
      end
    end
    for (int k = -2048; k <= 2047; k++) begin
      q12 = 12'(k);
      #1;
      checks++;
      if (bits_to_real(f12) != real'(k) / 64.0 || (k == 0 && f12 != 32'd0)) begin
        failures++;
        $display("FAIL W=12 q=%0d f=%h", k, f12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
