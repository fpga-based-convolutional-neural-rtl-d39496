// dma_controller: turns the layer controller's load/store steps into DMA
// commands and steers the returning words into the right buffer.
//
// On a one-cycle `req` the controller computes the SDRAM word address and
// length of the requested transfer from the job registers and the current
// block, tile and input-channel group:
//   weights: w_base  + blk*n_groups*KK*CI*CO, n_groups*KK*CI*CO words
//   bias:    b_base  + blk*CO,                CO words
//   input:   in_base + (tile*n_groups+grp)*CI*TILE*TILE, CI*TILE*TILE words
//   output:  out_base + (blk*n_tiles+tile)*CO*OT*OT, CO*OT*OT words (store)
// It then sends one command to the DMA. Incoming beats are routed by kind:
// weights to the STP reorder unit (which it restarts), bias words straight
// into the PE accumulators as their initial value (shifted from the result
// format to product scale), input words to the input memory with channel
// and pixel counters. Output stores read the output memory through the DMA
// directly. `xfer_done` pulses when the DMA reports completion.
//
// The address arithmetic follows the data layout in SDRAM (tiles of
// TILE x TILE x 64 channels, weights per output channel as input channel
// rows of nine taps); contiguous tiles, bias placement and the presetting
// of accumulators with the bias are this implementation's choices.
module dma_controller
  import cnn_pkg::*;
#(
  parameter int W = 16,
  parameter int ACC_W = 32,
  parameter int CH_IN = 64,
  parameter int CH_OUT = 64,
  parameter int TILE = 7,
  parameter int K = 3,
  parameter int LEN_W = 24,
  localparam int NP = TILE * TILE,
  localparam int OT = TILE - K + 1,
  localparam int CW = (CH_IN > 1) ? $clog2(CH_IN) : 1,
  localparam int OW = (CH_OUT > 1) ? $clog2(CH_OUT) : 1,
  localparam int PW = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  job_cfg_t                cfg,
  // request from the layer controller
  input  logic                    req,
  input  xfer_kind_e              req_kind,
  input  logic [7:0]              blk,
  input  logic [15:0]             tile,
  input  logic [7:0]              grp,
  output logic                    xfer_done,
  // DMA command port
  output logic                    cmd_valid,
  input  logic                    cmd_ready,
  output logic                    cmd_write,
  output logic [31:0]             cmd_addr,
  output logic [LEN_W-1:0]        cmd_len,
  input  logic                    dma_done,
  input  logic                    st_valid,
  input  logic [W-1:0]            st_data,
  // weight path (to STP)
  output logic                    stp_start,
  output logic                    stp_valid,
  output logic signed [W-1:0]     stp_data,
  // bias path (to PE accumulators)
  output logic                    init_en,
  output logic [OW-1:0]           init_addr,
  output logic signed [ACC_W-1:0] init_val,
  // input path (to input memory)
  output logic                    in_wr_en,
  output logic [CW-1:0]           in_wr_ch,
  output logic [PW-1:0]           in_wr_pos,
  output logic signed [W-1:0]     in_wr_data
);
  localparam int unsigned WBLK = K * K * CH_IN * CH_OUT;

  xfer_kind_e         kind;
  logic               pending;
  int unsigned        bias_cnt, ch_cnt, pos_cnt;
  logic signed [SHIFT_W-1:0] bshift;
  logic signed [ACC_W-1:0]   bias_ext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kind      <= T_WEIGHT;
      pending   <= 1'b0;
      cmd_write <= 1'b0;
      cmd_addr  <= '0;
      cmd_len   <= '0;
    end else begin
      if (req) begin
        kind    <= req_kind;
        pending <= 1'b1;
        unique case (req_kind)
          T_WEIGHT: begin
            cmd_write <= 1'b0;
            cmd_addr  <= cfg.w_base + 32'(blk) * 32'(cfg.n_groups) * WBLK;
            cmd_len   <= LEN_W'(32'(cfg.n_groups) * WBLK);
          end
          T_BIAS: begin
            cmd_write <= 1'b0;
            cmd_addr  <= cfg.b_base + 32'(blk) * CH_OUT;
            cmd_len   <= LEN_W'(CH_OUT);
          end
          T_INPUT: begin
            cmd_write <= 1'b0;
            cmd_addr  <= cfg.in_base +
                         (32'(tile) * 32'(cfg.n_groups) + 32'(grp)) * (CH_IN * NP);
            cmd_len   <= LEN_W'(CH_IN * NP);
          end
          default: begin
            cmd_write <= 1'b1;
            cmd_addr  <= cfg.out_base +
                         (32'(blk) * 32'(cfg.n_tiles) + 32'(tile)) * (CH_OUT * OT * OT);
            cmd_len   <= LEN_W'(CH_OUT * OT * OT);
          end
        endcase
      end else if (pending && cmd_ready) begin
        pending <= 1'b0;
      end
    end
  end

  assign cmd_valid = pending;
  assign xfer_done = dma_done;

  // Beat routing counters, cleared by every request.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bias_cnt <= 0; ch_cnt <= 0; pos_cnt <= 0;
    end else if (req) begin
      bias_cnt <= 0; ch_cnt <= 0; pos_cnt <= 0;
    end else if (st_valid) begin
      if (kind == T_BIAS) bias_cnt <= bias_cnt + 1;
      if (kind == T_INPUT) begin
        if (pos_cnt == NP - 1) begin
          pos_cnt <= 0;
          ch_cnt  <= ch_cnt + 1;
        end else pos_cnt <= pos_cnt + 1;
      end
    end
  end

  always_comb begin
    stp_start  = req && (req_kind == T_WEIGHT);
    stp_valid  = st_valid && (kind == T_WEIGHT);
    stp_data   = st_data;

    // bias: result format -> product scale (shift left by prod_shift)
    bshift   = prod_shift(cfg.fmt.int_in, cfg.fmt.int_w, cfg.fmt.int_out);
    bias_ext = ACC_W'(signed'(st_data));
    init_en   = st_valid && (kind == T_BIAS);
    init_addr = OW'(bias_cnt);
    if (bshift >= 0) init_val = bias_ext <<< bshift;
    else             init_val = bias_ext >>> (-bshift);

    in_wr_en   = st_valid && (kind == T_INPUT);
    in_wr_ch   = CW'(ch_cnt);
    in_wr_pos  = PW'(pos_cnt);
    in_wr_data = st_data;
  end
endmodule
