// tb_cnn_accel_full: one complete tile at the accelerator's default sizes
// (64 input channels, 64 output channels, 7x7 input tile, 3x3 kernel, 25 PEs)
// with the number formats of the first VGG-16 layer (input 8 integer digits,
// result 10; weights are taken as pure fractions, 0 integer digits) and ReLU
// on. All 1,600 output words are compared with a direct fixed-point
// convolution, and the calculate phase must take 9*64*64+2 cycles.
module tb_cnn_accel_full;
  import cnn_pkg::*;
  localparam int CI = 64, CO = 64, TILE = 7, K = 3, G = 1;
`include "accel_job.svh"

  cnn_accel_top dut (.*);

  initial begin
    wait_reset();
    run_job(1, 1, 1, 1'b1, 8, 0, 10);
    chk(64'(n_relu_zero > 0), 1, "ReLU zeroed an output");
    chk(64'(n_stalls > 0), 1, "SDRAM stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 1000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
