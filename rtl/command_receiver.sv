// command_receiver: register interface through which the host processor
// starts a convolution job.
//
// Avalon memory-mapped slave with 32-bit registers (word addresses), as seen
// behind the processor-to-FPGA bridge of an SoC FPGA:
//   0  control/status  write: bit 0 = start (self-clearing)
//                      read:  bit 0 = busy, bit 1 = done (sticky, cleared
//                             by the next start)
//   1  weight base     SDRAM word address of the weight blocks
//   2  bias base       SDRAM word address of the bias vectors
//   3  input base      SDRAM word address of the input tiles
//   4  output base     SDRAM word address of the output tiles
//   5  tiles           tiles per weight block (bits 15:0)
//   6  blocks/groups   bits 7:0 weight blocks, bits 15:8 input-channel groups
//   7  formats         bits 3:0 integer digits of the result, 7:4 of the
//                      weights, 11:8 of the input, bit 12 ReLU enable
//   8  cycles          clock cycles of the last job (read only)
// Reads return data one cycle after the request (fixed read latency 1).
// Writes to the job registers are ignored while a job runs.
//
// The document shows this block only as the command receiver feeding the
// state machine and the memories; the register map and bus are this
// implementation's own.
module command_receiver
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  input  logic        busy,
  input  logic        job_done,
  output job_cfg_t    cfg,
  output logic        start
);
  logic        done_flag;
  logic [31:0] cycles;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg          <= '0;
      start        <= 1'b0;
      done_flag    <= 1'b0;
      cycles       <= '0;
      avs_readdata <= '0;
    end else begin
      start <= 1'b0;
      if (busy) cycles <= cycles + 1'b1;
      if (job_done) done_flag <= 1'b1;
      if (avs_write && !busy && !start) begin
        unique case (avs_address)
          4'd0: if (avs_writedata[0]) begin
            start     <= 1'b1;
            done_flag <= 1'b0;
            cycles    <= '0;
          end
          4'd1: cfg.w_base   <= avs_writedata;
          4'd2: cfg.b_base   <= avs_writedata;
          4'd3: cfg.in_base  <= avs_writedata;
          4'd4: cfg.out_base <= avs_writedata;
          4'd5: cfg.n_tiles  <= avs_writedata[15:0];
          4'd6: begin
            cfg.n_blocks <= avs_writedata[7:0];
            cfg.n_groups <= avs_writedata[15:8];
          end
          4'd7: begin
            cfg.fmt.int_out <= avs_writedata[3:0];
            cfg.fmt.int_w   <= avs_writedata[7:4];
            cfg.fmt.int_in  <= avs_writedata[11:8];
            cfg.fmt.relu    <= avs_writedata[12];
          end
          default: ;
        endcase
      end
      if (avs_read) begin
        unique case (avs_address)
          4'd0: avs_readdata <= {30'd0, done_flag, busy | start};
          4'd1: avs_readdata <= cfg.w_base;
          4'd2: avs_readdata <= cfg.b_base;
          4'd3: avs_readdata <= cfg.in_base;
          4'd4: avs_readdata <= cfg.out_base;
          4'd5: avs_readdata <= {16'd0, cfg.n_tiles};
          4'd6: avs_readdata <= {16'd0, cfg.n_groups, cfg.n_blocks};
          4'd7: avs_readdata <= {19'd0, cfg.fmt.relu, cfg.fmt.int_in,
                                 cfg.fmt.int_w, cfg.fmt.int_out};
          4'd8: avs_readdata <= cycles;
          default: avs_readdata <= '0;
        endcase
      end
    end
  end
endmodule
