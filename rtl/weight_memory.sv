// weight_memory: on-chip store for one block of convolution weights.
//
// Simple dual-port RAM, one write port fed by the STP unit while weights are
// loaded and one synchronous read port driven by the controller during
// calculation. It holds DEPTH words of W bits: with the default sizes
// 64 input x 64 output channels x 9 kernel taps x 1 input-channel group =
// 36,864 words (576 Kbit), well inside the block RAM of a mid-size FPGA.
// Words are stored in calculation order, see `stp`.
//
// Timing: write on the clock edge; read data appears one cycle after the
// address. The block-RAM style with one-cycle read latency is this
// implementation's choice.
module weight_memory #(
  parameter int W = 16,
  parameter int DEPTH = 64 * 64 * 9,
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
