// tb_stp: streams a weight block in SDRAM order (group, output channel,
// input channel, tap) with gaps between beats and checks that every beat is
// written to the calculation-order address group/tap/input/output; a second
// load after `start` must begin again at the first address.
module tb_stp;
  localparam int CI = 3, CO = 5, KK = 4, G = 2;
  localparam int DEPTH = G * KK * CI * CO;
  logic clk = 0, rst_n = 0;
  logic start, in_valid, wr_en;
  logic signed [15:0] in_data, wr_data;
  logic [$clog2(DEPTH)-1:0] wr_addr;
  int checks = 0, failures = 0, cycles = 0;

  stp #(.W(16), .CH_IN(CI), .CH_OUT(CO), .KK(KK), .GROUPS(G)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic load(input int n_beats);
    int b = 0;
    start = 1; @(negedge clk); start = 0;
    for (int g = 0; g < G; g++)
      for (int o = 0; o < CO; o++)
        for (int i = 0; i < CI; i++)
          for (int t = 0; t < KK; t++) begin
            if (b == n_beats) return;
            while ($urandom % 3 == 0) begin
              in_valid = 0; @(negedge clk);
            end
            in_valid = 1; in_data = 16'($urandom);
            #1;
            checks++;
            if (!wr_en || wr_addr !== $bits(wr_addr)'(((g * KK + t) * CI + i) * CO + o)
                || wr_data !== in_data) begin
              failures++;
              $display("FAIL g%0d o%0d i%0d t%0d addr %0d", g, o, i, t, wr_addr);
            end
            @(negedge clk);
            b++;
          end
    in_valid = 0;
  endtask

  initial begin
    start = 0; in_valid = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load(17);            // abandoned part-way
    in_valid = 0;
    load(DEPTH);         // must restart from the beginning
    in_valid = 0;
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
