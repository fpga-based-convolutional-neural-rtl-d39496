// pe_array: the grid of processing elements that computes one tile.
//
// The array holds OT x OT PEs, OT = TILE-K+1, one per output pixel of a
// TILE x TILE input tile convolved with a K x K kernel without padding
// (TILE=7, K=3: 25 PEs). Every cycle the input memory presents all
// TILE*TILE pixels of one input channel (`pix`), and the weight memory
// presents one weight `w` for kernel tap (`kr`,`kc`) and output channel
// `och`. PE (r,c) takes pixel (r+kr, c+kc), so a single weight is shared by
// all PEs in the same cycle: the weight is broadcast, the input is spread.
// The output stage reads accumulator `rd_och` of PE `rd_pe` (row-major).
//
// Timing: combinational pixel selection in front of the PEs' one-cycle MAC.
// The original design computes many output elements in parallel on many
// PEs; assigning one output pixel to each PE, and the 5x5 array size, are
// this implementation's choices.
module pe_array #(
  parameter int W = 16,
  parameter int ACC_W = 32,
  parameter int CH_OUT = 64,
  parameter int TILE = 7,
  parameter int K = 3,
  parameter int DW = 4,
  localparam int OT = TILE - K + 1,
  localparam int N_PE = OT * OT,
  localparam int AW = (CH_OUT > 1) ? $clog2(CH_OUT) : 1,
  localparam int KW = $clog2(K + 1),
  localparam int PW = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic                    clk,
  input  logic signed [W-1:0]     pix [TILE*TILE],
  input  logic signed [W-1:0]     w,
  input  logic [KW-1:0]           kr,
  input  logic [KW-1:0]           kc,
  input  logic [AW-1:0]           och,
  input  logic                    mac_en,
  input  logic                    init_en,
  input  logic [AW-1:0]           init_addr,
  input  logic signed [ACC_W-1:0] init_val,
  input  logic [PW-1:0]           rd_pe,
  input  logic [AW-1:0]           rd_och,
  output logic signed [ACC_W-1:0] rd_data
);
  logic signed [ACC_W-1:0] pe_rd [N_PE];

  for (genvar r = 0; r < OT; r++) begin : g_row
    for (genvar c = 0; c < OT; c++) begin : g_col
      logic signed [W-1:0] x;
      always_comb x = pix[(r + int'(kr)) * TILE + c + int'(kc)];

      pe #(.W(W), .ACC_W(ACC_W), .N_ACC(CH_OUT), .DW(DW)) u_pe (
        .clk      (clk),
        .init_en  (init_en),
        .init_addr(init_addr),
        .init_val (init_val),
        .mac_en   (mac_en),
        .mac_addr (och),
        .x        (x),
        .w        (w),
        .rd_addr  (rd_och),
        .rd_data  (pe_rd[r*OT+c])
      );
    end
  end

  assign rd_data = pe_rd[rd_pe];
endmodule
