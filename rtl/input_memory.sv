// input_memory: banked on-chip store for one input tile.
//
// The tile is TILE x TILE pixels by CH input channels (default 7 x 7 x 64,
// 3,136 words). It is split into TILE*TILE banks, one per pixel position,
// each CH words deep, so that one read returns the whole TILE x TILE slice
// of a channel at once: the PE array needs every pixel of a channel in the
// same cycle. The loader writes one word at a time, addressed by channel
// and pixel position (row-major), which is the order the tile is laid out
// in SDRAM.
//
// Timing: write on the clock edge; the slice of channel `rd_ch` appears on
// `rd_pix` one cycle after the address. Banking by pixel position is this
// implementation's choice.
module input_memory #(
  parameter int W = 16,
  parameter int TILE = 7,
  parameter int CH = 64,
  localparam int NP = TILE * TILE,
  localparam int CW = (CH > 1) ? $clog2(CH) : 1,
  localparam int PW = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [CW-1:0]       wr_ch,
  input  logic [PW-1:0]       wr_pos,
  input  logic signed [W-1:0] wr_data,
  input  logic [CW-1:0]       rd_ch,
  output logic signed [W-1:0] rd_pix [NP]
);
  for (genvar p = 0; p < NP; p++) begin : g_bank
    logic signed [W-1:0] bank [CH];
    always_ff @(posedge clk) begin
      if (wr_en && int'(wr_pos) == p) bank[wr_ch] <= wr_data;
      rd_pix[p] <= bank[rd_ch];
    end
  end
endmodule
