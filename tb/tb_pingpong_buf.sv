// tb_pingpong_buf: checks the two-bank feature buffer. Fills a bank,
// commits it, fills the second bank, checks that the producer is then held
// off (both banks full), reads each bank back through two read ports at
// random addresses (data one cycle after the address), releases it and
// checks the free/ready flags after every step, for several rounds.
module tb_pingpong_buf;
  localparam int DEPTH = 16;
  localparam int AW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_free, wr_en, wr_commit, rd_ready, rd_release;
  logic [AW-1:0] wr_addr, rd_addr [2];
  logic signed [7:0] wr_data, rd_data [2];
  int checks = 0, failures = 0;
  logic [7:0] model [2][DEPTH];
  int stall_events = 0;

  always #5 clk = !clk;

  pingpong_buf #(.W(8), .DEPTH(DEPTH), .NRD(2)) dut (.*);

  task automatic expect_flags(logic f, logic r, string what);
    checks++;
    if (wr_free !== f || rd_ready !== r) begin
      failures++;
      $display("FAIL %s: wr_free=%0b rd_ready=%0b expected %0b %0b", what, wr_free, rd_ready, f, r);
    end
  endtask

  task automatic fill(int bank);
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = 8'($urandom_range(0, 255));
      model[bank][i] = wr_data;
      wr_commit = (i == DEPTH - 1);
    end
    @(negedge clk); wr_en = 0; wr_commit = 0;
  endtask

  task automatic drain(int bank);
    for (int i = 0; i < 12; i++) begin
      int x0, x1;
      x0 = $urandom_range(0, DEPTH - 1); x1 = $urandom_range(0, DEPTH - 1);
      @(negedge clk); rd_addr[0] = AW'(x0); rd_addr[1] = AW'(x1);
      @(negedge clk);
      checks += 2;
      if (rd_data[0] !== model[bank][x0] || rd_data[1] !== model[bank][x1]) begin
        failures++;
        $display("FAIL read bank %0d", bank);
      end
    end
    @(negedge clk); rd_release = 1;
    @(negedge clk); rd_release = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_commit = 0; rd_release = 0; wr_addr = '0; wr_data = '0;
    rd_addr[0] = '0; rd_addr[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_flags(1, 0, "after reset");
    for (int round = 0; round < 4; round++) begin
      // model[1] holds the image committed first, model[0] the second
      fill(1);
      expect_flags(1, 1, "one bank full");
      fill(0);
      expect_flags(0, 1, "both banks full");
      if (!wr_free) stall_events++;
      drain(1);
      expect_flags(1, 1, "after first release");
      drain(0);
      expect_flags(1, 0, "after second release");
    end
    checks++;
    if (stall_events == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
