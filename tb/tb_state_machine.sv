// tb_state_machine: runs a job of 2 weight blocks x 2 tiles x 2 input-channel
// groups with small sizes, answering every transfer request after a random
// delay. Checks the order of requests and their block/tile/group indices
// against the nested loops block -> tile -> group, the weight address and
// channel sequence and the length of every calculate phase, the
// re-quantisation sweep of the output phase, and that each of the three
// loop-backs of the state diagram is taken.
module tb_state_machine;
  import cnn_pkg::*;
  localparam int CI = 2, CO = 3, TILE = 4, K = 3, G = 2;
  localparam int OT = TILE - K + 1, N_PE = OT * OT;
  localparam int WDEPTH = G * K * K * CI * CO;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, req, xfer_done, mac_en, out_wr_en;
  job_cfg_t cfg;
  ctrl_state_e state;
  xfer_kind_e req_kind;
  logic [7:0] blk, grp;
  logic [15:0] tile;
  logic [$clog2(WDEPTH)-1:0] w_rd_addr;
  logic [0:0] in_rd_ch;
  logic [1:0] kr, kc, och, rd_och;
  logic [1:0] rd_pe;
  logic [3:0] out_wr_addr;
  int checks = 0, failures = 0, cycles = 0;
  int n_conv_loop = 0, n_line_loop = 0, n_block_loop = 0, n_done = 0;
  int calc_len = 0, n_mac = 0, drain = 0;
  ctrl_state_e prev;

  state_machine #(.CH_IN(CI), .CH_OUT(CO), .TILE(TILE), .K(K), .GROUPS(G)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s got %0d exp %0d (cycle %0d)", what, got, exp, cycles);
    end
  endtask

  // expected request sequence
  typedef struct { xfer_kind_e k; int b; int t; int g; } exp_req_t;
  exp_req_t exp_q[$];
  int delay = -1;

  always @(posedge clk) begin
    cycles++;
    xfer_done <= 1'b0;
    if (delay > 0) delay <= delay - 1;
    if (delay == 0) begin
      xfer_done <= 1'b1;
      delay <= -1;
    end
    if (req) begin
      exp_req_t e;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected request");
      end else begin
        e = exp_q.pop_front();
        chk(64'(req_kind), 64'(e.k), "req kind");
        chk(64'(blk), 64'(e.b), "req blk");
        if (e.k != T_WEIGHT) chk(64'(tile), 64'(e.t), "req tile");
        if (e.k == T_INPUT) chk(64'(grp), 64'(e.g), "req grp");
      end
      delay <= $urandom % 5;
    end
    prev <= state;
    if (prev == S_CALC && state == S_LOAD_INPUT) n_conv_loop++;
    if (prev == S_OUTPUT && state == S_LOAD_BIAS) n_line_loop++;
    if (prev == S_OUTPUT && state == S_LOAD_WEIGHT) n_block_loop++;
    if (done) n_done++;
    // calculate phase: length and address sequence
    if (prev == S_CALC && state != S_CALC) begin
      chk(64'(calc_len), 64'(K * K * CI * CO + 2), "calc cycles");
      chk(64'(n_mac), 64'(K * K * CI * CO), "mac count");
      calc_len = 0; n_mac = 0;
    end
    if (mac_en) begin
      int t, i, o;
      t = n_mac / (CI * CO); i = (n_mac / CO) % CI; o = n_mac % CO;
      chk(64'(kr), 64'(t / K), "kr");
      chk(64'(kc), 64'(t % K), "kc");
      chk(64'(och), 64'(o), "och");
      n_mac++;
    end
    if (state == S_CALC && calc_len < K * K * CI * CO) begin
      int t, i, o;
      t = calc_len / (CI * CO); i = (calc_len / CO) % CI; o = calc_len % CO;
      chk(64'(w_rd_addr), 64'(((int'(grp) * K * K + t) * CI + i) * CO + o), "w_rd_addr");
      chk(64'(in_rd_ch), 64'(i), "in_rd_ch");
    end
    if (state == S_CALC) calc_len++;
    if (out_wr_en) begin
      chk(64'(out_wr_addr), 64'(drain), "out_wr_addr");
      chk(64'(rd_och), 64'(drain / N_PE), "rd_och");
      chk(64'(rd_pe), 64'(drain % N_PE), "rd_pe");
      drain = (drain + 1) % (CO * N_PE);
    end
  end

  initial begin
    cfg = '0;
    cfg.n_tiles = 2; cfg.n_blocks = 2; cfg.n_groups = 2;
    start = 0; xfer_done = 0;
    for (int b = 0; b < 2; b++) begin
      exp_q.push_back('{T_WEIGHT, b, 0, 0});
      for (int t = 0; t < 2; t++) begin
        exp_q.push_back('{T_BIAS, b, t, 0});
        for (int g = 0; g < 2; g++) exp_q.push_back('{T_INPUT, b, t, g});
        exp_q.push_back('{T_OUTPUT, b, t, 0});
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(64'(busy), 0, "idle before start");
    start = 1; @(negedge clk); start = 0;
    chk(64'(busy), 1, "busy after start");
    wait (done);
    @(negedge clk); @(negedge clk);
    chk(64'(state), 64'(S_INIT), "back to initial");
    chk(64'(exp_q.size()), 0, "all requests seen");
    chk(64'(n_done), 1, "one done pulse");
    chk(64'(n_conv_loop), 4, "calculate->load input loops");
    chk(64'(n_line_loop), 2, "output->load bias loops");
    chk(64'(n_block_loop), 1, "output->load weight loops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
