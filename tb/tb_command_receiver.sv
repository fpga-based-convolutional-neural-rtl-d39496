// tb_command_receiver: writes every job register, reads it back with the
// one-cycle read latency, checks the decoded job fields, the start pulse,
// busy/done status and the cycle counter, and that job registers are locked
// while busy.
module tb_command_receiver;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] avs_address;
  logic avs_write, avs_read, busy, job_done, start;
  logic [31:0] avs_writedata, avs_readdata;
  job_cfg_t cfg;
  int checks = 0, failures = 0, cycles = 0, starts = 0;

  command_receiver dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (rst_n && start) starts++;
  end

  task automatic wr(input int a, input logic [31:0] d);
    avs_address = 4'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  task automatic rd_check(input int a, input logic [31:0] exp);
    avs_address = 4'(a); avs_read = 1;
    @(negedge clk); avs_read = 0;
    checks++;
    if (avs_readdata !== exp) begin
      failures++; $display("FAIL reg %0d got %h exp %h", a, avs_readdata, exp);
    end
  endtask

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    avs_address = 0; avs_write = 0; avs_read = 0; avs_writedata = 0; busy = 0; job_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(1, 32'h1000_0001); wr(2, 32'h2000_0002); wr(3, 32'h3000_0003); wr(4, 32'h4000_0004);
    wr(5, 32'h0001_0123); wr(6, 32'h0000_0305); wr(7, 32'h0000_1a0b);
    rd_check(1, 32'h1000_0001); rd_check(2, 32'h2000_0002);
    rd_check(3, 32'h3000_0003); rd_check(4, 32'h4000_0004);
    rd_check(5, 32'h0000_0123); rd_check(6, 32'h0000_0305); rd_check(7, 32'h0000_1a0b);
    expect_eq(64'(cfg.n_tiles), 64'h123, "n_tiles");
    expect_eq(64'(cfg.n_blocks), 64'h05, "n_blocks");
    expect_eq(64'(cfg.n_groups), 64'h03, "n_groups");
    expect_eq(64'(cfg.fmt.relu), 64'h1, "relu");
    expect_eq(64'(cfg.fmt.int_in), 64'ha, "int_in");
    expect_eq(64'(cfg.fmt.int_w), 64'h0, "int_w");
    expect_eq(64'(cfg.fmt.int_out), 64'hb, "int_out");
    rd_check(0, 32'h0);
    // start: one pulse, then the job runs for 20 cycles
    wr(0, 32'h1);
    busy = 1;
    @(negedge clk);
    expect_eq(64'(starts), 64'd1, "start pulses");
    wr(1, 32'hdead_beef);                 // ignored while busy
    rd_check(1, 32'h1000_0001);
    rd_check(0, 32'h1);
    repeat (17) @(negedge clk);
    job_done = 1; @(negedge clk); job_done = 0; busy = 0;
    rd_check(0, 32'h2);
    rd_check(8, 32'd22);
    wr(0, 32'h1);                         // a new start clears done
    rd_check(0, 32'h1);
    @(negedge clk);
    expect_eq(64'(starts), 64'd2, "start pulses");
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
