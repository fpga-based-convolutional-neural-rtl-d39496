// output_memory: on-chip buffer for one finished output tile.
//
// Simple dual-port RAM of DEPTH W-bit words (default 64 output channels x
// 5 x 5 output pixels = 1,600 words). The output stage writes the
// re-quantised PE results into it in SDRAM order (channel-major, pixels
// row-major inside a channel) and the DMA reads it back to store the tile.
//
// Timing: write on the clock edge; read data one cycle after the address.
// The output memory between PE array and DMA is part of the original
// design; its depth, layout and read latency are this implementation's.
module output_memory #(
  parameter int W = 16,
  parameter int DEPTH = 64 * 5 * 5,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic signed [W-1:0] wr_data,
  input  logic [AW-1:0]       rd_addr,
  output logic signed [W-1:0] rd_data
);
  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
