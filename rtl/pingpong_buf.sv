// pingpong_buf: double-buffered feature-map memory between two layers.
//
// The layers of the accelerator run as a dataflow pipeline: while one layer
// works on image n, the layer before it may already produce image n+1. Each
// link between two layers is therefore a memory with two banks. The producer
// fills one bank, word by word at any addresses, and then commits it; the
// consumer reads a committed bank in any order and releases it when it has
// finished. A bank is never written while it is being read, which is the
// rule that no layer takes a new input before it has finished the current
// one. Producer and consumer each alternate between bank 0 and bank 1.
// The layer-level pipelining is the accelerator's; the two-bank memory that
// makes it possible is this design's choice of how to build it.
//
// Interface:
//   wr_free     a bank is empty and may be written (producer may start)
//   wr_en/wr_addr/wr_data   write into the producer's current bank
//   wr_commit   pulse: the producer's bank is complete
//   rd_ready    a committed bank is waiting to be read
//   rd_addr[i]/rd_data[i]   NRD independent read ports
//   rd_release  pulse: the consumer is done with its bank
// Timing: rd_data[i] is registered, valid one cycle after rd_addr[i].
// Writes take effect on the clock edge.
module pingpong_buf #(
  parameter int unsigned W     = 8,      // word width
  parameter int unsigned DEPTH = 1024,   // words per bank
  parameter int unsigned NRD   = 1,      // read ports
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // producer side
  output logic          wr_free,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic signed [W-1:0] wr_data,
  input  logic          wr_commit,
  // consumer side
  output logic          rd_ready,
  input  logic [AW-1:0] rd_addr [NRD],
  output logic signed [W-1:0] rd_data [NRD],
  input  logic          rd_release
);

  logic signed [W-1:0] mem [2][DEPTH];
  logic [1:0]   full;
  logic         wr_bank, rd_bank;

  assign wr_free  = !full[wr_bank];
  assign rd_ready =  full[rd_bank];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wr_bank <= 1'b0;
      rd_bank <= 1'b0;
    end else begin
      if (wr_commit) begin
        full[wr_bank] <= 1'b1;
        wr_bank       <= !wr_bank;
      end
      if (rd_release) begin
        full[rd_bank] <= 1'b0;
        rd_bank       <= !rd_bank;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][wr_addr] <= wr_data;
  end

  for (genvar i = 0; i < NRD; i++) begin : g_rd
    always_ff @(posedge clk) rd_data[i] <= mem[rd_bank][rd_addr[i]];
  end

  // The producer may only touch an empty bank, the consumer only a full one.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_wr_free:  assert (!(wr_en || wr_commit) || wr_free)
        else $error("pingpong_buf: write into a full bank");
      a_rd_ready: assert (!rd_release || rd_ready)
        else $error("pingpong_buf: release of an empty bank");
    end
  end

endmodule
