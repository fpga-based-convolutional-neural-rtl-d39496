// state_machine: the layer controller of the accelerator.
//
// Sequences one job through the seven states
//   initial -> load weight -> load bias -> load input -> calculate -> output -> end
// with three loops back:
//   calculate -> load input  when the tile has another input-channel group
//                            to add in ("finish conv" of one group),
//   output -> load bias      when the current weight block has another tile
//                            ("finish line"),
//   output -> load weight    when all tiles are done and another weight block
//                            (group of output channels) follows ("finish loop").
// Load states issue one request to the DMA controller and wait for its done.
//
// Calculate walks kernel tap (outermost), input channel, output channel
// (innermost), one step per cycle: each step reads one weight, and the input
// slice of the current channel, and one cycle later the PE array does a MAC
// with them. A group takes K*K*CH_IN*CH_OUT cycles plus two cycles of
// pipeline drain. Output first re-quantises every accumulator into the output
// memory (CH_OUT*OT*OT cycles, channel-major), then asks for the store.
// `done` pulses when the job reaches end; the controller then returns to
// initial and waits for the next `start`.
//
// The states and the order of the calculation loops come from the design
// description; what each loop-back condition counts is this implementation's
// reading of the state diagram.
module state_machine
  import cnn_pkg::*;
#(
  parameter int CH_IN = 64,
  parameter int CH_OUT = 64,
  parameter int TILE = 7,
  parameter int K = 3,
  parameter int GROUPS = 1,
  localparam int OT = TILE - K + 1,
  localparam int N_PE = OT * OT,
  localparam int WDEPTH = GROUPS * K * K * CH_IN * CH_OUT,
  localparam int WAW = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  localparam int CW = (CH_IN > 1) ? $clog2(CH_IN) : 1,
  localparam int OW = (CH_OUT > 1) ? $clog2(CH_OUT) : 1,
  localparam int KW = $clog2(K + 1),
  localparam int PW = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int ODEPTH = CH_OUT * N_PE,
  localparam int OAW = (ODEPTH > 1) ? $clog2(ODEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  job_cfg_t       cfg,
  output ctrl_state_e    state,
  output logic           busy,
  output logic           done,
  // DMA controller
  output logic           req,
  output xfer_kind_e     req_kind,
  output logic [7:0]     blk,
  output logic [15:0]    tile,
  output logic [7:0]     grp,
  input  logic           xfer_done,
  // calculation
  output logic [WAW-1:0] w_rd_addr,
  output logic [CW-1:0]  in_rd_ch,
  output logic           mac_en,
  output logic [KW-1:0]  kr,
  output logic [KW-1:0]  kc,
  output logic [OW-1:0]  och,
  // output drain
  output logic [PW-1:0]  rd_pe,
  output logic [OW-1:0]  rd_och,
  output logic           out_wr_en,
  output logic [OAW-1:0] out_wr_addr
);
  logic        storing;      // output: drain finished, store running
  logic        issue_done;   // calculate: last step issued
  int unsigned c_tr, c_tc, c_ich, c_och;
  logic        s_mac;
  logic [KW-1:0] s_kr, s_kc;
  logic [OW-1:0] s_och;
  int unsigned d_och, d_pe;
  logic [1:0]  drain_tail;
  logic [7:0]  n_groups_eff;

  assign busy = (state != S_INIT);
  assign n_groups_eff = (cfg.n_groups == 0) ? 8'd1 :
                        (cfg.n_groups > 8'(GROUPS)) ? 8'(GROUPS) : cfg.n_groups;

  // one request in the first cycle of every load state and for the store
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; storing <= 1'b0; issue_done <= 1'b0;
      blk <= '0; tile <= '0; grp <= '0; done <= 1'b0;
      c_tr <= 0; c_tc <= 0; c_ich <= 0; c_och <= 0;
      d_och <= 0; d_pe <= 0; drain_tail <= '0;
      req <= 1'b0; req_kind <= T_WEIGHT;
    end else begin
      req  <= 1'b0;
      done <= 1'b0;
      unique case (state)
        S_INIT: if (start) begin
          blk <= '0; tile <= '0; grp <= '0;
          if (cfg.n_blocks == 0 || cfg.n_tiles == 0) begin
            state <= S_END;
          end else begin
            state <= S_LOAD_WEIGHT;
            req <= 1'b1; req_kind <= T_WEIGHT;
          end
        end
        S_LOAD_WEIGHT: if (xfer_done) begin
          state <= S_LOAD_BIAS;
          req <= 1'b1; req_kind <= T_BIAS;
        end
        S_LOAD_BIAS: if (xfer_done) begin
          grp <= '0;
          state <= S_LOAD_INPUT;
          req <= 1'b1; req_kind <= T_INPUT;
        end
        S_LOAD_INPUT: if (xfer_done) begin
          state <= S_CALC;
          c_tr <= 0; c_tc <= 0; c_ich <= 0; c_och <= 0;
          issue_done <= 1'b0; drain_tail <= '0;
        end
        S_CALC: begin
          if (!issue_done) begin
            if (c_och == CH_OUT - 1) begin
              c_och <= 0;
              if (c_ich == CH_IN - 1) begin
                c_ich <= 0;
                if (c_tc == K - 1) begin
                  c_tc <= 0;
                  if (c_tr == K - 1) begin
                    c_tr <= 0;
                    issue_done <= 1'b1;
                  end else c_tr <= c_tr + 1;
                end else c_tc <= c_tc + 1;
              end else c_ich <= c_ich + 1;
            end else c_och <= c_och + 1;
          end else begin
            drain_tail <= drain_tail + 1'b1;
            if (drain_tail == 2'd1) begin
              if (32'(grp) + 1 < 32'(n_groups_eff)) begin
                grp <= grp + 1'b1;                      // finish conv
                state <= S_LOAD_INPUT;
                req <= 1'b1; req_kind <= T_INPUT;
              end else begin
                state <= S_OUTPUT;
                storing <= 1'b0; d_och <= 0; d_pe <= 0;
              end
            end
          end
        end
        S_OUTPUT: begin
          if (!storing) begin
            if (d_pe == N_PE - 1) begin
              d_pe <= 0;
              if (d_och == CH_OUT - 1) begin
                d_och <= 0;
                storing <= 1'b1;
                req <= 1'b1; req_kind <= T_OUTPUT;
              end else d_och <= d_och + 1;
            end else d_pe <= d_pe + 1;
          end else if (xfer_done) begin
            storing <= 1'b0;
            if (32'(tile) + 1 < 32'(cfg.n_tiles)) begin
              tile <= tile + 1'b1;                      // finish line
              state <= S_LOAD_BIAS;
              req <= 1'b1; req_kind <= T_BIAS;
            end else if (32'(blk) + 1 < 32'(cfg.n_blocks)) begin
              blk <= blk + 1'b1;                        // finish loop
              tile <= '0;
              state <= S_LOAD_WEIGHT;
              req <= 1'b1; req_kind <= T_WEIGHT;
            end else begin
              state <= S_END;
            end
          end
        end
        S_END: begin
          done <= 1'b1;
          state <= S_INIT;
        end
        default: state <= S_INIT;
      endcase
    end
  end

  // calculation addressing (issue stage) and the one-cycle MAC stage
  always_comb begin
    w_rd_addr = WAW'((((32'(grp) * K + c_tr) * K + c_tc) * CH_IN + c_ich) * CH_OUT + c_och);
    in_rd_ch  = CW'(c_ich);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_mac <= 1'b0; s_kr <= '0; s_kc <= '0; s_och <= '0;
    end else begin
      s_mac <= (state == S_CALC) && !issue_done;
      s_kr  <= KW'(c_tr);
      s_kc  <= KW'(c_tc);
      s_och <= OW'(c_och);
    end
  end

  always_comb begin
    mac_en      = s_mac;
    kr          = s_kr;
    kc          = s_kc;
    och         = s_och;
    rd_pe       = PW'(d_pe);
    rd_och      = OW'(d_och);
    out_wr_en   = (state == S_OUTPUT) && !storing;
    out_wr_addr = OAW'(d_och * N_PE + d_pe);
  end
endmodule
