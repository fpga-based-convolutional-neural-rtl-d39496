// tb_vgg_conv_workload: a slice of a VGG-16 layer with 128 input and 128
// output channels (the shape of conv2_2) at full tile and channel-block
// sizes: the accelerator is built with two input-channel groups, and one job
// covers both 64-channel output blocks for two 7x7 input tiles, i.e. eight
// calculate phases of 36,866 cycles. Number formats are those of the second
// layer in the digit-allocation table (input 10 integer digits, result 12);
// weights are pure fractions. Every output word is checked against a direct
// fixed-point convolution.
module tb_vgg_conv_workload;
  import cnn_pkg::*;
  localparam int CI = 64, CO = 64, TILE = 7, K = 3, G = 2;
`include "accel_job.svh"

  cnn_accel_top #(.GROUPS(G)) dut (.*);

  initial begin
    wait_reset();
    run_job(2, 2, 2, 1'b1, 10, 0, 12);
    chk(64'(n_conv_loop), 4, "calculate->load input loops");
    chk(64'(n_line_loop), 2, "output->load bias loops");
    chk(64'(n_block_loop), 1, "output->load weight loops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
