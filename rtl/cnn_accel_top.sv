// cnn_accel_top: convolution-layer accelerator for VGG-16 style networks.
//
// The host processor runs the fully-connected layers itself and hands every
// 3x3 convolution layer to this block. It writes the job registers through
// the command receiver, the layer controller (state machine) then has the
// DMA bring weights, bias and input tiles from SDRAM into on-chip memories,
// the PE array computes one tile of outputs, and the results are
// re-quantised and stored back to SDRAM:
//
//   host --Avalon slave--> command_receiver --> state_machine --> dma_controller
//   SDRAM controller <--Avalon master--> dma --> stp --> weight_memory --+
//                                          |--> input_memory ----------+--> pe_array
//                                          |--> (bias into the PEs)    |
//                                          +<-- output_memory <-- fixed_requant
//
// Numbers are 16-bit dynamic fixed point; the job's format register says
// where the binary point sits for input, weights and result. A tile is
// TILE x TILE input pixels x CH_IN channels and yields OT x OT output pixels
// (OT = TILE-K+1, no padding inside the tile) for CH_OUT output channels.
// Default sizes: 64 x 64 channels, 7 x 7 input tiles, 25 PEs.
//
// Timing per tile and input-channel group: K*K*CH_IN*CH_OUT + 2 cycles of
// calculation (36,866 at the defaults), plus the loads, CH_OUT*OT*OT cycles of
// re-quantisation and about three cycles per stored word. `irq` pulses once
// when a job ends. The SDRAM controller itself (a vendor core) is outside
// this block; its Avalon master port is brought out.
//
// The block set, the 64x64x9 weight block, the 7x7x64 input tile, the loop
// order and the controller states follow the original design; the buses,
// register map, PE organisation and input-channel groups (GROUPS) are this
// implementation's own.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int CH_IN  = 64,
  parameter int CH_OUT = 64,
  parameter int TILE   = 7,
  parameter int K      = 3,
  parameter int GROUPS = 1,
  parameter int ACC_W  = 32,
  localparam int W      = DATA_W,
  localparam int OT     = TILE - K + 1,
  localparam int N_PE   = OT * OT,
  localparam int NP     = TILE * TILE,
  localparam int WDEPTH = GROUPS * K * K * CH_IN * CH_OUT,
  localparam int ODEPTH = CH_OUT * N_PE,
  localparam int OAW    = (ODEPTH > 1) ? $clog2(ODEPTH) : 1,
  localparam int WAW    = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  localparam int CW     = (CH_IN > 1) ? $clog2(CH_IN) : 1,
  localparam int OW     = (CH_OUT > 1) ? $clog2(CH_OUT) : 1,
  localparam int PW     = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int IPW    = (NP > 1) ? $clog2(NP) : 1,
  localparam int KW     = $clog2(K + 1),
  localparam int LEN_W  = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  // host register port (Avalon-MM slave)
  input  logic [3:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  output logic        irq,
  output logic [2:0]  ctrl_state,     // current controller state (cnn_pkg::ctrl_state_e)
  // SDRAM controller port (Avalon-MM master)
  output logic [31:0] avm_address,
  output logic        avm_read,
  output logic        avm_write,
  output logic [15:0] avm_writedata,
  input  logic [15:0] avm_readdata,
  input  logic        avm_readdatavalid,
  input  logic        avm_waitrequest
);
  job_cfg_t     cfg;
  logic         start, busy, done;
  ctrl_state_e  state;
  logic         req, xfer_done;
  xfer_kind_e   req_kind;
  logic [7:0]   blk, grp;
  logic [15:0]  tile;

  logic               cmd_valid, cmd_ready, cmd_write, dma_done, st_valid;
  logic [31:0]        cmd_addr;
  logic [LEN_W-1:0]   cmd_len;
  logic [W-1:0]       st_data;
  logic [OAW-1:0]     lcl_addr;
  logic [W-1:0]       lcl_data;

  logic               stp_start, stp_valid, w_wr_en;
  logic signed [W-1:0] stp_data, w_wr_data, w_rd_data;
  logic [WAW-1:0]     w_wr_addr, w_rd_addr;

  logic               init_en;
  logic [OW-1:0]      init_addr;
  logic signed [ACC_W-1:0] init_val, acc_rd;

  logic               in_wr_en;
  logic [CW-1:0]      in_wr_ch, in_rd_ch;
  logic [IPW-1:0]     in_wr_pos;
  logic signed [W-1:0] in_wr_data;
  logic signed [W-1:0] pix [NP];

  logic               mac_en, out_wr_en;
  logic [KW-1:0]      kr, kc;
  logic [OW-1:0]      och, rd_och;
  logic [PW-1:0]      rd_pe;
  logic [OAW-1:0]     out_wr_addr;
  logic signed [W-1:0] q;

  assign irq = done;
  assign ctrl_state = state;

  command_receiver u_cmd (
    .clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read,
    .avs_readdata, .busy, .job_done(done), .cfg, .start
  );

  state_machine #(
    .CH_IN(CH_IN), .CH_OUT(CH_OUT), .TILE(TILE), .K(K), .GROUPS(GROUPS)
  ) u_fsm (
    .clk, .rst_n, .start, .cfg, .state, .busy, .done,
    .req, .req_kind, .blk, .tile, .grp, .xfer_done,
    .w_rd_addr, .in_rd_ch, .mac_en, .kr, .kc, .och,
    .rd_pe, .rd_och, .out_wr_en, .out_wr_addr
  );

  dma_controller #(
    .W(W), .ACC_W(ACC_W), .CH_IN(CH_IN), .CH_OUT(CH_OUT), .TILE(TILE), .K(K),
    .LEN_W(LEN_W)
  ) u_dmac (
    .clk, .rst_n, .cfg, .req, .req_kind, .blk, .tile, .grp, .xfer_done,
    .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_len, .dma_done,
    .st_valid, .st_data,
    .stp_start, .stp_valid, .stp_data,
    .init_en, .init_addr, .init_val,
    .in_wr_en, .in_wr_ch, .in_wr_pos, .in_wr_data
  );

  dma #(.W(W), .ADDR_W(32), .LEN_W(LEN_W), .LCL_AW(OAW)) u_dma (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_len,
    .done(dma_done), .st_valid, .st_data, .lcl_addr, .lcl_data,
    .avm_address, .avm_read, .avm_write, .avm_writedata, .avm_readdata,
    .avm_readdatavalid, .avm_waitrequest
  );

  stp #(.W(W), .CH_IN(CH_IN), .CH_OUT(CH_OUT), .KK(K*K), .GROUPS(GROUPS)) u_stp (
    .clk, .rst_n, .start(stp_start), .in_valid(stp_valid), .in_data(stp_data),
    .wr_en(w_wr_en), .wr_addr(w_wr_addr), .wr_data(w_wr_data)
  );

  weight_memory #(.W(W), .DEPTH(WDEPTH)) u_wmem (
    .clk, .wr_en(w_wr_en), .wr_addr(w_wr_addr), .wr_data(w_wr_data),
    .rd_addr(w_rd_addr), .rd_data(w_rd_data)
  );

  input_memory #(.W(W), .TILE(TILE), .CH(CH_IN)) u_imem (
    .clk, .wr_en(in_wr_en), .wr_ch(in_wr_ch), .wr_pos(in_wr_pos),
    .wr_data(in_wr_data), .rd_ch(in_rd_ch), .rd_pix(pix)
  );

  pe_array #(
    .W(W), .ACC_W(ACC_W), .CH_OUT(CH_OUT), .TILE(TILE), .K(K), .DW(DIGIT_W)
  ) u_pes (
    .clk, .pix, .w(w_rd_data), .kr, .kc, .och, .mac_en,
    .init_en, .init_addr, .init_val,
    .rd_pe, .rd_och, .rd_data(acc_rd)
  );

  fixed_requant #(.W(W), .ACC_W(ACC_W), .SW(SHIFT_W)) u_rq (
    .acc(acc_rd),
    .shift(prod_shift(cfg.fmt.int_in, cfg.fmt.int_w, cfg.fmt.int_out)),
    .relu(cfg.fmt.relu),
    .q(q)
  );

  output_memory #(.W(W), .DEPTH(ODEPTH)) u_omem (
    .clk, .wr_en(out_wr_en), .wr_addr(out_wr_addr), .wr_data(q),
    .rd_addr(lcl_addr), .rd_data(lcl_data)
  );
endmodule
