// dma: moves blocks of 16-bit words between SDRAM and the on-chip buffers.
//
// One command at a time: `cmd_write`=0 reads `cmd_len` words starting at
// SDRAM word address `cmd_addr` and hands each one out on the `st_*` beat
// port in address order; `cmd_write`=1 fetches `cmd_len` words from a local
// buffer (addresses 0..len-1 on `lcl_addr`, data on `lcl_data` one cycle
// later) and writes them to SDRAM from `cmd_addr` upwards. `done` pulses for
// one cycle when the last read word has arrived or the last write has been
// accepted.
//
// SDRAM side: an Avalon memory-mapped master as offered by the FPGA vendor's
// SDRAM controller (word addresses, `waitrequest` back-pressure, pipelined
// reads returned with `readdatavalid`, data in issue order). Reads are
// pipelined, one request per cycle while the controller accepts them;
// writes take three cycles each (fetch, capture, issue). The DMA has no
// burst support. The bus protocol and the write pacing are this
// implementation's choices; the document names SDRAM controller and DMA only.
module dma #(
  parameter int W = 16,
  parameter int ADDR_W = 32,
  parameter int LEN_W = 24,
  parameter int LCL_AW = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_write,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [LEN_W-1:0]  cmd_len,
  output logic              done,
  // read beats towards the buffers
  output logic              st_valid,
  output logic [W-1:0]      st_data,
  // local buffer read port for stores
  output logic [LCL_AW-1:0] lcl_addr,
  input  logic [W-1:0]      lcl_data,
  // Avalon-MM master to the SDRAM controller
  output logic [ADDR_W-1:0] avm_address,
  output logic              avm_read,
  output logic              avm_write,
  output logic [W-1:0]      avm_writedata,
  input  logic [W-1:0]      avm_readdata,
  input  logic              avm_readdatavalid,
  input  logic              avm_waitrequest
);
  typedef enum logic [2:0] {D_IDLE, D_READ, D_FETCH, D_CAP, D_WR} dma_state_e;
  dma_state_e          state;
  logic [ADDR_W-1:0]   base;
  logic [LEN_W-1:0]    len, issued, received;
  logic [W-1:0]        wdata;

  assign cmd_ready = (state == D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= D_IDLE;
      base     <= '0;
      len      <= '0;
      issued   <= '0;
      received <= '0;
      wdata    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        D_IDLE: if (cmd_valid) begin
          base     <= cmd_addr;
          len      <= cmd_len;
          issued   <= '0;
          received <= '0;
          if (cmd_len == '0) done <= 1'b1;
          else state <= cmd_write ? D_FETCH : D_READ;
        end
        D_READ: begin
          if (avm_read && !avm_waitrequest) issued <= issued + 1'b1;
          if (avm_readdatavalid) begin
            received <= received + 1'b1;
            if (received == len - 1'b1) begin
              state <= D_IDLE;
              done  <= 1'b1;
            end
          end
        end
        D_FETCH: state <= D_CAP;
        D_CAP: begin
          wdata <= lcl_data;
          state <= D_WR;
        end
        D_WR: if (!avm_waitrequest) begin
          issued <= issued + 1'b1;
          if (issued == len - 1'b1) begin
            state <= D_IDLE;
            done  <= 1'b1;
          end else state <= D_FETCH;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  always_comb begin
    avm_read      = (state == D_READ) && (issued != len);
    avm_write     = (state == D_WR);
    avm_address   = base + ADDR_W'(issued);
    avm_writedata = wdata;
    lcl_addr      = LCL_AW'(issued);
    st_valid      = (state == D_READ) && avm_readdatavalid;
    st_data       = avm_readdata;
  end

  // Avalon-MM rule: a stalled request keeps its command and address.
  property p_hold_read;
    @(posedge clk) disable iff (!rst_n)
      (avm_read && avm_waitrequest) |=> (avm_read && $stable(avm_address));
  endproperty
  property p_hold_write;
    @(posedge clk) disable iff (!rst_n)
      (avm_write && avm_waitrequest) |=>
        (avm_write && $stable(avm_address) && $stable(avm_writedata));
  endproperty
  a_hold_read:  assert property (p_hold_read);
  a_hold_write: assert property (p_hold_write);
endmodule
