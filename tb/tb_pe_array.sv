// tb_pe_array: a 5x5-pixel, 3x3-kernel array (9 PEs, 4 output channels) is
// given random channel slices and weights for every kernel tap; the result of
// each PE is compared with a direct convolution sum computed in the bench.
module tb_pe_array;
  localparam int TILE = 5, K = 3, CO = 4, CI = 3;
  localparam int OT = TILE - K + 1, NP = TILE * TILE, N_PE = OT * OT;
  logic clk = 0;
  logic signed [15:0] pix [NP];
  logic signed [15:0] w;
  logic [1:0] kr, kc;
  logic [1:0] och, init_addr, rd_och;
  logic mac_en, init_en;
  logic signed [31:0] init_val, rd_data;
  logic [3:0] rd_pe;
  logic signed [15:0] img [CI][NP];
  logic signed [15:0] wt [CO][CI][K*K];
  logic signed [31:0] bias [CO];
  int checks = 0, failures = 0, cycles = 0;

  pe_array #(.W(16), .ACC_W(32), .CH_OUT(CO), .TILE(TILE), .K(K), .DW(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    mac_en = 0; init_en = 0; kr = 0; kc = 0; och = 0; w = 0; init_addr = 0; init_val = 0;
    rd_pe = 0; rd_och = 0;
    foreach (pix[i]) pix[i] = 0;
    foreach (img[c, p]) img[c][p] = 16'($urandom);
    foreach (wt[o, c, t]) wt[o][c][t] = 16'($urandom);
    foreach (bias[o]) bias[o] = 32'($urandom);
    @(negedge clk);
    for (int o = 0; o < CO; o++) begin
      init_en = 1; init_addr = 2'(o); init_val = bias[o]; @(negedge clk);
    end
    init_en = 0;
    // tap outermost, then input channel, then output channel
    for (int t = 0; t < K * K; t++)
      for (int c = 0; c < CI; c++)
        for (int o = 0; o < CO; o++) begin
          foreach (pix[i]) pix[i] = img[c][i];
          kr = 2'(t / K); kc = 2'(t % K); och = 2'(o); w = wt[o][c][t]; mac_en = 1;
          @(negedge clk);
        end
    mac_en = 0;
    for (int o = 0; o < CO; o++)
      for (int r = 0; r < OT; r++)
        for (int cc = 0; cc < OT; cc++) begin
          longint s;
          s = longint'(bias[o]);
          for (int c = 0; c < CI; c++)
            for (int i = 0; i < K; i++)
              for (int j = 0; j < K; j++)
                s += longint'(img[c][(r + i) * TILE + cc + j]) * longint'(wt[o][c][i * K + j]);
          rd_pe = 4'(r * OT + cc); rd_och = 2'(o); #1;
          checks++;
          if (rd_data !== 32'(s)) begin
            failures++; $display("FAIL o=%0d r=%0d c=%0d got %0d exp %0d", o, r, cc, rd_data, 32'(s));
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
