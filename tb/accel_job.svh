// accel_job.svh: shared body of the end-to-end testbenches. Included inside a
// testbench module that defines CI, CO, TILE, K and G as localparams before
// the include, and instantiates cnn_accel_top as `dut` with (.*).
//
// SDRAM layout used by the jobs (16-bit word addresses):
//   weights  W_BASE + ((b*groups + g)*CO + o)*CI*K*K + c*K*K + tap
//   bias     B_BASE + b*CO + o
//   input    I_BASE + ((t*groups + g)*CI + c)*TILE*TILE + pixel
//   output   O_BASE + ((b*tiles + t)*CO + o)*OT*OT + pixel
  localparam int W_BASE = 32'h100, B_BASE = 32'h40, I_BASE = 32'h40000, O_BASE = 32'h60000;

  logic        clk = 0, rst_n = 0;
  logic [3:0]  avs_address;
  logic        avs_write, avs_read, irq;
  logic [31:0] avs_writedata, avs_readdata;
  logic [2:0]  ctrl_state;
  logic [31:0] avm_address;
  logic        avm_read, avm_write, avm_readdatavalid, avm_waitrequest;
  logic [15:0] avm_writedata, avm_readdata;
  int checks = 0, failures = 0, cycles = 0;
  int n_conv_loop = 0, n_line_loop = 0, n_block_loop = 0, n_stalls = 0;
  int n_relu_zero = 0, n_neg_pass = 0, calc_len = 0;
  logic [2:0] prev_state = 3'(S_INIT);

  sdram_model #(.WORDS(1 << 19), .LAT(3), .STALL_PCT(15)) u_sdram (
    .clk, .address(avm_address), .read(avm_read), .write(avm_write),
    .writedata(avm_writedata), .readdata(avm_readdata),
    .readdatavalid(avm_readdatavalid), .waitrequest(avm_waitrequest)
  );

  always #5 clk = ~clk;

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, $signed(got), $signed(exp));
    end
  endtask

  always @(posedge clk) begin
    cycles++;
    if ((avm_read || avm_write) && avm_waitrequest) n_stalls++;
    prev_state <= ctrl_state;
    if (prev_state == 3'(S_CALC) && ctrl_state == 3'(S_LOAD_INPUT)) n_conv_loop++;
    if (prev_state == 3'(S_OUTPUT) && ctrl_state == 3'(S_LOAD_BIAS)) n_line_loop++;
    if (prev_state == 3'(S_OUTPUT) && ctrl_state == 3'(S_LOAD_WEIGHT)) n_block_loop++;
    if (ctrl_state == 3'(S_CALC)) calc_len++;
    if (prev_state == 3'(S_CALC) && ctrl_state != 3'(S_CALC)) begin
      chk(64'(calc_len), 64'(K * K * CI * CO + 2), "calculate phase cycles");
      calc_len = 0;
    end
  end

  task automatic wait_reset();
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  task automatic reg_wr(input int a, input logic [31:0] d);
    avs_address = 4'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  // One job: fills SDRAM with random operands, runs the accelerator and
  // compares every output word with the reference convolution.
  task automatic run_job(input int blocks, input int tiles, input int groups,
                         input logic relu, input int iin, input int iw, input int iout);
    localparam int NP = TILE * TILE, OT = TILE - K + 1, KK = K * K;
    int shift;
    int t0;
    shift = 15 + iout - iin - iw;
    for (int a = 0; a < blocks * groups * CO * CI * KK; a++)
      u_sdram.mem[W_BASE + a] = 16'($signed(int'($urandom % 4001) - 2000));
    for (int a = 0; a < blocks * CO; a++)
      u_sdram.mem[B_BASE + a] = 16'($signed(int'($urandom % 2001) - 1000));
    for (int a = 0; a < tiles * groups * CI * NP; a++)
      u_sdram.mem[I_BASE + a] = 16'($urandom % 30000);
    for (int a = 0; a < blocks * tiles * CO * OT * OT; a++)
      u_sdram.mem[O_BASE + a] = 16'hdead;

    reg_wr(1, W_BASE); reg_wr(2, B_BASE); reg_wr(3, I_BASE); reg_wr(4, O_BASE);
    reg_wr(5, 32'(tiles)); reg_wr(6, {16'd0, 8'(groups), 8'(blocks)});
    reg_wr(7, {19'd0, relu, 4'(iin), 4'(iw), 4'(iout)});
    t0 = cycles;
    reg_wr(0, 32'h1);
    while (!irq) @(negedge clk);
    $display("job blocks=%0d tiles=%0d groups=%0d relu=%0d: %0d cycles",
             blocks, tiles, groups, relu, cycles - t0);

    for (int b = 0; b < blocks; b++)
      for (int t = 0; t < tiles; t++)
        for (int o = 0; o < CO; o++)
          for (int r = 0; r < OT; r++)
            for (int c = 0; c < OT; c++) begin
              longint s;
              logic signed [31:0] acc;
              logic signed [15:0] exp_q;
              s = longint'($signed(u_sdram.mem[B_BASE + b * CO + o]));
              s = (shift >= 0) ? (s <<< shift) : (s >>> (-shift));
              for (int g = 0; g < groups; g++)
                for (int ch = 0; ch < CI; ch++)
                  for (int i = 0; i < K; i++)
                    for (int j = 0; j < K; j++)
                      s += longint'($signed(u_sdram.mem[I_BASE + ((t * groups + g) * CI + ch) * NP
                                                        + (r + i) * TILE + c + j]))
                         * longint'($signed(u_sdram.mem[W_BASE + ((b * groups + g) * CO + o) * CI * KK
                                                        + ch * KK + i * K + j]));
              acc = 32'(s);
              if (relu && acc < 0) begin
                exp_q = 0;
                n_relu_zero++;
              end else begin
                longint m;
                m = (shift >= 0) ? (longint'(acc) >>> shift) : (longint'(acc) <<< (-shift));
                exp_q = m[15:0];
                if (!relu && exp_q < 0) n_neg_pass++;
              end
              chk({48'd0, u_sdram.mem[O_BASE + ((b * tiles + t) * CO + o) * OT * OT + r * OT + c]},
                  {48'd0, exp_q}, "output word");
            end
  endtask
