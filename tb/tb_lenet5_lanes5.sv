// tb_lenet5_lanes5: end-to-end test of the accelerator with the kernel row
// unrolled (5 products per cycle through the adder tree) and the carry
// variant of the approximate MAC. Same checks as tb_lenet5_top.
module tb_lenet5_lanes5;
  import lenet5_pkg::*;

  logic        clk, rst_n, cfg_valid, pix_valid, pix_ready;
  logic        res_valid, res_ready, res_last;
  cfg_wr_t     cfg;
  logic [31:0] pix_data, res_data;
  logic [3:0]  res_idx;
  logic [6:0]  layer_busy;

  lenet5_top #(.LANES(5), .CONV_MODE(MAC_CARRY)) dut (.*);

  lenet5_tb_driver #(.LANES(5), .MODE(MAC_CARRY), .NIMG(3)) drv (.*);

  // watchdog: three images take under 1,000,000 cycles at LANES = 1
  initial begin
    #(64'd10 * 64'd3_000_000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule
