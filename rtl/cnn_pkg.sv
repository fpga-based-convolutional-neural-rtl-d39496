// cnn_pkg: types and helper functions shared by the convolution accelerator.
//
// Numbers are 16-bit two's-complement dynamic fixed point: one sign bit,
// `int_digits` integer bits and 15-int_digits fraction bits. The split is
// chosen per layer before run time and differs for the input feature map,
// the weights and the result of a layer. A product of two such numbers is
// kept at full 32-bit precision; moving it to the result format is a
// single arithmetic shift by
//     shift = (DATA_W-1) + int_result - int_a - int_b
// (right for a positive value, left for a negative one), followed by taking
// the low DATA_W bits, i.e. plain truncation without saturation.
//
// The 16-bit format with per-layer binary point and the truncating cut follow
// the original design; the field widths and the job-register layout are this
// implementation's own.
//
// The accelerator runs the layer controller through the seven states
// initial, load weight, load bias, load input, calculate, output and end.
package cnn_pkg;

  localparam int DATA_W = 16;          // fixed point 16 with one sign bit
  localparam int DIGIT_W = 4;          // integer-digit count 0..15
  localparam int SHIFT_W = 7;          // signed product-to-result shift

  typedef logic signed [DATA_W-1:0] fxp_t;

  // Per-layer number formats plus the ReLU switch.
  typedef struct packed {
    logic               relu;
    logic [DIGIT_W-1:0] int_in;   // integer digits of the input feature map
    logic [DIGIT_W-1:0] int_w;    // integer digits of the weights
    logic [DIGIT_W-1:0] int_out;  // integer digits of bias and result
  } fxp_fmt_t;

  // Layer job written by the host through the command receiver.
  // SDRAM addresses count 16-bit words.
  typedef struct packed {
    logic [31:0] w_base;     // weight blocks
    logic [31:0] b_base;     // bias vectors, one per weight block
    logic [31:0] in_base;    // input tiles
    logic [31:0] out_base;   // output tiles
    logic [15:0] n_tiles;    // tiles per weight block
    logic [7:0]  n_blocks;   // weight blocks (output-channel groups)
    logic [7:0]  n_groups;   // input-channel groups per tile
    fxp_fmt_t    fmt;
  } job_cfg_t;

  typedef enum logic [2:0] {
    S_INIT        = 3'd0,
    S_LOAD_WEIGHT = 3'd1,
    S_LOAD_BIAS   = 3'd2,
    S_LOAD_INPUT  = 3'd3,
    S_CALC        = 3'd4,
    S_OUTPUT      = 3'd5,
    S_END         = 3'd6
  } ctrl_state_e;

  // Which on-chip buffer a transfer feeds or drains.
  typedef enum logic [1:0] {
    T_WEIGHT = 2'd0,
    T_BIAS   = 2'd1,
    T_INPUT  = 2'd2,
    T_OUTPUT = 2'd3
  } xfer_kind_e;

  // Shift that moves a full-precision product into the result format.
  function automatic logic signed [SHIFT_W-1:0] prod_shift(
      input logic [DIGIT_W-1:0] int_a, input logic [DIGIT_W-1:0] int_b,
      input logic [DIGIT_W-1:0] int_r);
    int s;
    s = (DATA_W - 1) + int'(int_r) - int'(int_a) - int'(int_b);
    return SHIFT_W'(s);
  endfunction

endpackage
