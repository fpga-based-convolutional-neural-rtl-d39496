// tb_dma_controller: for each transfer kind checks the DMA command (SDRAM
// address, length, direction) computed from the job registers and the
// block/tile/group indices, then streams beats and checks where they go:
// weights to the STP port, bias into the PE preset port (shifted to product
// scale, both shift directions), input words to the input memory with the
// right channel and pixel.
module tb_dma_controller;
  import cnn_pkg::*;
  localparam int CI = 2, CO = 3, TILE = 4, K = 3, NP = TILE * TILE, OT = TILE - K + 1;
  logic clk = 0, rst_n = 0;
  job_cfg_t cfg;
  logic req, xfer_done, cmd_valid, cmd_ready, cmd_write, dma_done, st_valid;
  xfer_kind_e req_kind;
  logic [7:0] blk, grp;
  logic [15:0] tile;
  logic [31:0] cmd_addr;
  logic [23:0] cmd_len;
  logic [15:0] st_data;
  logic stp_start, stp_valid, init_en, in_wr_en;
  logic signed [15:0] stp_data, in_wr_data;
  logic [1:0] init_addr;
  logic signed [31:0] init_val;
  logic [0:0] in_wr_ch;
  logic [3:0] in_wr_pos;
  int checks = 0, failures = 0, cycles = 0;

  dma_controller #(.W(16), .ACC_W(32), .CH_IN(CI), .CH_OUT(CO), .TILE(TILE), .K(K),
                   .LEN_W(24)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s got %0d exp %0d", what, $signed(got), $signed(exp));
    end
  endtask

  // issue a request and check the command
  task automatic request(input xfer_kind_e k, input int b, input int t, input int g,
                         input longint exp_addr, input int exp_len, input logic exp_wr);
    req = 1; req_kind = k; blk = 8'(b); tile = 16'(t); grp = 8'(g);
    #1;
    chk(64'(stp_start), 64'(k == T_WEIGHT), "stp_start");
    @(negedge clk); req = 0;
    chk(64'(cmd_valid), 1, "cmd_valid");
    chk(64'(cmd_addr), 64'(exp_addr), "cmd_addr");
    chk(64'(cmd_len), 64'(exp_len), "cmd_len");
    chk(64'(cmd_write), 64'(exp_wr), "cmd_write");
    @(negedge clk);
    chk(64'(cmd_valid), 0, "cmd_valid drops");
  endtask

  task automatic finish_xfer();
    dma_done = 1; #1;
    chk(64'(xfer_done), 1, "xfer_done");
    @(negedge clk); dma_done = 0;
  endtask

  initial begin
    cfg = '0;
    cfg.w_base = 1000; cfg.b_base = 50; cfg.in_base = 5000; cfg.out_base = 9000;
    cfg.n_tiles = 3; cfg.n_blocks = 2; cfg.n_groups = 2;
    cfg.fmt.int_in = 8; cfg.fmt.int_w = 2; cfg.fmt.int_out = 10;   // shift 15
    req = 0; req_kind = T_WEIGHT; blk = 0; tile = 0; grp = 0;
    cmd_ready = 1; dma_done = 0; st_valid = 0; st_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // weights of block 1: two groups
    request(T_WEIGHT, 1, 0, 0, 1000 + 1 * 2 * 9 * CI * CO, 2 * 9 * CI * CO, 0);
    for (int i = 0; i < 5; i++) begin
      st_valid = 1; st_data = 16'(100 + i); #1;
      chk(64'(stp_valid), 1, "stp_valid");
      chk(64'(stp_data), 64'(100 + i), "stp_data");
      chk(64'(init_en || in_wr_en), 0, "no other sink");
      @(negedge clk);
    end
    st_valid = 0;
    finish_xfer();

    // bias of block 1, shift left by 15
    request(T_BIAS, 1, 0, 0, 50 + CO, CO, 0);
    for (int i = 0; i < CO; i++) begin
      st_valid = 1; st_data = 16'(-3 + 2 * i); #1;
      chk(64'(init_en), 1, "init_en");
      chk(64'(init_addr), 64'(i), "init_addr");
      chk(64'(init_val), 64'(32'((-3 + 2 * i) * 32768)), "init_val");
      @(negedge clk);
    end
    st_valid = 0;
    finish_xfer();

    // bias with a negative shift (int_in 15, int_w 15, int_out 0 -> -15)
    cfg.fmt.int_in = 15; cfg.fmt.int_w = 15; cfg.fmt.int_out = 0;
    request(T_BIAS, 0, 0, 0, 50, CO, 0);
    st_valid = 1; st_data = 16'h7fff; #1;
    chk(64'(init_val), 64'(32'sd0), "init_val right shift");
    @(negedge clk);
    st_data = 16'h8000; #1;
    chk(64'(init_val), 64'(-32'sd1), "init_val right shift negative");
    @(negedge clk);
    st_valid = 0;
    finish_xfer();

    // input tile 2, group 1
    request(T_INPUT, 1, 2, 1, 5000 + (2 * 2 + 1) * CI * NP, CI * NP, 0);
    for (int i = 0; i < CI * NP; i++) begin
      st_valid = 1; st_data = 16'(i * 7); #1;
      chk(64'(in_wr_en), 1, "in_wr_en");
      chk(64'(in_wr_ch), 64'(i / NP), "in_wr_ch");
      chk(64'(in_wr_pos), 64'(i % NP), "in_wr_pos");
      chk(64'(in_wr_data), 64'(i * 7), "in_wr_data");
      @(negedge clk);
      if (i == 5) begin
        st_valid = 0; @(negedge clk);         // a gap between beats
      end
    end
    st_valid = 0;
    finish_xfer();

    // output store of block 1, tile 2
    request(T_OUTPUT, 1, 2, 0, 9000 + (1 * 3 + 2) * CO * OT * OT, CO * OT * OT, 1);
    finish_xfer();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
