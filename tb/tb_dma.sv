// tb_dma: runs the DMA against the SDRAM model with random stalls.
// Reads: several blocks at random addresses; every beat must carry the model
// memory word of the next address, in order, and `done` must follow the last
// beat. Writes: blocks from a local buffer with one-cycle read latency; the
// model memory must then hold them, and nothing outside the block may change.
// The Avalon hold rules are checked by the assertions inside the DMA.
module tb_dma;
  localparam int WORDS = 4096;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, cmd_write, done, st_valid;
  logic [31:0] cmd_addr;
  logic [23:0] cmd_len;
  logic [15:0] st_data, lcl_data;
  logic [10:0] lcl_addr;
  logic [31:0] avm_address;
  logic avm_read, avm_write, avm_readdatavalid, avm_waitrequest;
  logic [15:0] avm_writedata, avm_readdata;
  logic [15:0] lcl_mem [2048];
  logic [15:0] shadow [WORDS];
  int checks = 0, failures = 0, cycles = 0, stalls = 0;

  dma #(.W(16), .ADDR_W(32), .LEN_W(24), .LCL_AW(11)) dut (.*);

  sdram_model #(.WORDS(WORDS), .LAT(3), .STALL_PCT(30)) u_mem (
    .clk, .address(avm_address), .read(avm_read), .write(avm_write),
    .writedata(avm_writedata), .readdata(avm_readdata),
    .readdatavalid(avm_readdatavalid), .waitrequest(avm_waitrequest)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if ((avm_read || avm_write) && avm_waitrequest) stalls++;
    lcl_data <= lcl_mem[lcl_addr];
  end

  task automatic run_read(input int addr, input int len);
    int got = 0;
    cmd_valid = 1; cmd_write = 0; cmd_addr = 32'(addr); cmd_len = 24'(len);
    @(negedge clk); cmd_valid = 0;
    while (1) begin
      @(posedge clk); #1;
      if (st_valid) begin
        checks++;
        if (st_data !== shadow[(addr + got) % WORDS]) begin
          failures++; $display("FAIL read %0d+%0d", addr, got);
        end
        got++;
      end
      if (done) break;
    end
    checks++;
    if (got != len) begin
      failures++; $display("FAIL read beats %0d of %0d", got, len);
    end
    @(negedge clk);
  endtask

  task automatic run_write(input int addr, input int len);
    for (int i = 0; i < len; i++) begin
      lcl_mem[i] = 16'($urandom);
      shadow[(addr + i) % WORDS] = lcl_mem[i];
    end
    cmd_valid = 1; cmd_write = 1; cmd_addr = 32'(addr); cmd_len = 24'(len);
    @(negedge clk); cmd_valid = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (u_mem.mem[i] !== shadow[i]) begin
        failures++; $display("FAIL mem[%0d] after write", i);
      end
    end
  endtask

  initial begin
    cmd_valid = 0; cmd_write = 0; cmd_addr = 0; cmd_len = 0;
    for (int i = 0; i < WORDS; i++) begin
      shadow[i] = 16'($urandom);
      u_mem.mem[i] = shadow[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_read(10, 1);
    run_read(100, 57);
    run_write(200, 33);
    run_read(190, 60);
    run_write(4000, 200);   // wraps around the model memory
    run_read(1000, 300);
    checks++;
    if (stalls == 0) begin
      failures++; $display("FAIL no stall exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
