// tb_lenet5_top: end-to-end test of the accelerator in its default
// configuration (one product per cycle, rounded approximate MAC). Three
// images are streamed through the full-size network; lenet5_tb_driver
// checks every score against an integer model, the latency against the
// per-image cycle count of the design, and the steady-state image rate.
module tb_lenet5_top;
  import lenet5_pkg::*;

  logic        clk, rst_n, cfg_valid, pix_valid, pix_ready;
  logic        res_valid, res_ready, res_last;
  cfg_wr_t     cfg;
  logic [31:0] pix_data, res_data;
  logic [3:0]  res_idx;
  logic [6:0]  layer_busy;

  lenet5_top dut (.*);

  lenet5_tb_driver #(.LANES(1), .MODE(MAC_ROUNDED), .NIMG(3)) drv (.*);

  // watchdog: three images take under 1,000,000 cycles at LANES = 1
  initial begin
    #(64'd10 * 64'd3_000_000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule
