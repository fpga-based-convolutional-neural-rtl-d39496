// sdram_model: behavioural stand-in for the SDRAM and its vendor controller,
// for simulation only.
//
// Avalon-MM slave with 16-bit words and word addresses. Requests are stalled
// with `waitrequest` on a pseudo-random pattern (about one cycle in STALL_PCT
// percent); accepted reads return their data in order LAT cycles later with
// `readdatavalid`. The array `mem` is visible hierarchically so that a
// testbench can preload and inspect it. Address bits above WORDS wrap.
module sdram_model #(
  parameter int WORDS = 1 << 16,
  parameter int LAT = 3,
  parameter int STALL_PCT = 20
) (
  input  logic        clk,
  input  logic [31:0] address,
  input  logic        read,
  input  logic        write,
  input  logic [15:0] writedata,
  output logic [15:0] readdata,
  output logic        readdatavalid,
  output logic        waitrequest
);
  logic [15:0] mem [WORDS];
  logic [15:0] pipe_d [LAT];
  logic        pipe_v [LAT];
  int unsigned stall_seed;

  initial begin
    for (int i = 0; i < LAT; i++) begin
      pipe_v[i] = 1'b0;
      pipe_d[i] = '0;
    end
    waitrequest = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (write && !waitrequest) mem[address % WORDS] <= writedata;
    pipe_v[0] <= read && !waitrequest;
    pipe_d[0] <= mem[address % WORDS];
    for (int i = 1; i < LAT; i++) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    waitrequest <= ($urandom % 100) < STALL_PCT;
  end

  assign readdatavalid = pipe_v[LAT-1];
  assign readdata      = pipe_d[LAT-1];
endmodule
