// param_ram: on-chip store for the trained weights and biases of one layer.
//
// The accelerator is configured once: the host writes every weight and bias
// into these memories, and they are then reused for every image that
// follows, without being sent again. Each layer owns one param_ram holding
// its weights at addresses 0 .. NW-1 followed by its biases. The memory has
// one write port for loading and NRD read ports so that a layer can fetch
// several weights and its bias in the same cycle.
// Keeping the parameters on chip after one configuration follows the
// accelerator description; the layout and port count are this design's.
//
// Timing: writes take effect on the clock edge; rd_data[i] is registered,
// valid one cycle after rd_addr[i].
module param_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned NRD   = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic signed [W-1:0] wdata,
  input  logic [AW-1:0] rd_addr [NRD],
  output logic signed [W-1:0] rd_data [NRD]
);

  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar i = 0; i < NRD; i++) begin : g_rd
    always_ff @(posedge clk) rd_data[i] <= mem[rd_addr[i]];
  end

endmodule
