// stp: serial-to-parallel reordering of the weight stream.
//
// Weights arrive from the DMA one 16-bit word per beat in their SDRAM order:
// for each input-channel group, for each output channel, for each input
// channel, the K*K kernel taps (tap fastest). The calculation reads them in a
// different order, tap outermost, then input channel, then output channel:
//     (in 1,out 1,tap 1) (in 1,out 2,tap 1) .. (in 64,out 64,tap 1)
//     (in 1,out 1,tap 2) .. (in 64,out 64,tap 9)
// so that one weight per cycle can be broadcast to the PE array while the
// input slice stays put for CH_OUT cycles. This unit counts the incoming
// beats (tap, input channel, output channel, group) and turns each into the
// weight-memory write address
//     group*KK*CI*CO + tap*CI*CO + in*CO + out.
// `start` clears the counters at the beginning of a weight load.
//
// Timing: the write is issued in the cycle the beat arrives (no storage).
// The document names this unit only; treating it as the reordering stage
// between DMA and weight memory is this implementation's reading.
module stp #(
  parameter int W = 16,
  parameter int CH_IN = 64,
  parameter int CH_OUT = 64,
  parameter int KK = 9,
  parameter int GROUPS = 1,
  localparam int DEPTH = GROUPS * KK * CH_IN * CH_OUT,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                wr_en,
  output logic [AW-1:0]       wr_addr,
  output logic signed [W-1:0] wr_data
);
  int unsigned tap, ich, och, grp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tap <= 0; ich <= 0; och <= 0; grp <= 0;
    end else if (start) begin
      tap <= 0; ich <= 0; och <= 0; grp <= 0;
    end else if (in_valid) begin
      if (tap == KK - 1) begin
        tap <= 0;
        if (ich == CH_IN - 1) begin
          ich <= 0;
          if (och == CH_OUT - 1) begin
            och <= 0;
            grp <= (grp == GROUPS - 1) ? 0 : grp + 1;
          end else och <= och + 1;
        end else ich <= ich + 1;
      end else tap <= tap + 1;
    end
  end

  always_comb begin
    wr_en   = in_valid && !start;
    wr_addr = AW'(((grp * KK + tap) * CH_IN + ich) * CH_OUT + och);
    wr_data = in_data;
  end
endmodule
