// tb_weight_memory: fills the RAM with random words, then reads every address and
// checks the data and the one-cycle read latency; also checks that a write
// and a read of different addresses in the same cycle do not disturb each other.
module tb_weight_memory;
  localparam int DEPTH = 200;
  logic clk = 0;
  logic wr_en;
  logic [7:0] wr_addr, rd_addr;
  logic signed [15:0] wr_data, rd_data;
  logic signed [15:0] model [DEPTH];
  int checks = 0, failures = 0, cycles = 0;

  weight_memory #(.W(16), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wr_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_addr = 8'(i); wr_data = 16'($urandom); model[i] = wr_data;
      @(negedge clk);
    end
    for (int i = 0; i < DEPTH; i++) begin
      // concurrent write of another address with a new value
      wr_en = 1; wr_addr = 8'((i + 7) % DEPTH); wr_data = 16'($urandom);
      rd_addr = 8'(i);
      @(negedge clk);
      model[(i + 7) % DEPTH] = wr_data;
      checks++;
      if (rd_data !== model[i]) begin
        failures++; $display("FAIL addr %0d got %0d exp %0d", i, rd_data, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
