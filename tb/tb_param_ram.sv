// tb_param_ram: writes random words to every address of a parameter
// memory, then reads them back through three independent read ports at
// random addresses and checks each word one cycle after its address.
module tb_param_ram;
  localparam int DEPTH = 40;
  localparam int AW = 6;

  logic clk = 1'b0;
  logic we;
  logic [AW-1:0] waddr, rd_addr [3];
  logic signed [7:0] wdata, rd_data [3];
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  param_ram #(.W(8), .DEPTH(DEPTH), .NRD(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [3];
    we = 0; waddr = '0; wdata = '0;
    for (int p = 0; p < 3; p++) rd_addr[p] = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = 8'($urandom_range(0, 255)); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < 3; p++) begin
        x[p] = $urandom_range(0, DEPTH - 1);
        rd_addr[p] = AW'(x[p]);
      end
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rd_data[p] !== model[x[p]]) begin
          failures++;
          $display("FAIL port %0d addr %0d got %h expected %h", p, x[p], rd_data[p], model[x[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
