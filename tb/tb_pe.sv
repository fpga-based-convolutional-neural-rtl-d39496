// tb_pe: presets the accumulators, runs random multiply-accumulates into
// random accumulators and compares every accumulator with a reference array
// updated with the same full-precision products.
module tb_pe;
  localparam int N = 8;
  logic clk = 0;
  logic init_en, mac_en;
  logic [2:0] init_addr, mac_addr, rd_addr;
  logic signed [31:0] init_val, rd_data;
  logic signed [15:0] x, w;
  longint model [N];
  int checks = 0, failures = 0, cycles = 0;

  pe #(.W(16), .ACC_W(32), .N_ACC(N), .DW(4)) dut (.*);

  always #50 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    init_en = 0; mac_en = 0; init_addr = 0; mac_addr = 0; rd_addr = 0;
    init_val = 0; x = 0; w = 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      init_en = 1; init_addr = 3'(i); init_val = 32'($urandom);
      model[i] = longint'(init_val);
      @(negedge clk);
    end
    init_en = 0;
    for (int t = 0; t < 500; t++) begin
      mac_en = 1'($urandom % 4 != 0);
      mac_addr = 3'($urandom); x = 16'($urandom); w = 16'($urandom);
      if (mac_en) model[mac_addr] = longint'(32'(model[mac_addr] + longint'(x) * longint'(w)));
      @(negedge clk);
      mac_en = 0;
      for (int i = 0; i < N; i++) begin
        rd_addr = 3'(i); #1;
        checks++;
        if (rd_data !== 32'(model[i])) begin
          failures++; $display("FAIL t=%0d acc%0d got %0d exp %0d", t, i, rd_data, 32'(model[i]));
        end
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
