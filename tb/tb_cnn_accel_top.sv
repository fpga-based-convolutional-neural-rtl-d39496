// tb_cnn_accel_top: end-to-end test of the accelerator at reduced sizes.
//
// A host model programs the job registers over the Avalon slave, the SDRAM
// model (random stalls) holds weights, bias and input tiles in the layout
// the accelerator expects, and after the interrupt every output word in
// SDRAM is compared with a direct fixed-point convolution computed here.
// Two jobs run: the first with ReLU, 2 weight blocks, 2 tiles and 2
// input-channel groups (every loop of the controller); the second with ReLU
// off and another number format. The bench counts the mechanisms it saw:
// each controller loop-back, SDRAM stalls, outputs zeroed by ReLU, negative
// outputs passed without ReLU, and checks the length of every calculate phase.
module tb_cnn_accel_top;
  import cnn_pkg::*;
  localparam int CI = 4, CO = 3, TILE = 5, K = 3, G = 2;
`include "accel_job.svh"

  cnn_accel_top #(.CH_IN(CI), .CH_OUT(CO), .TILE(TILE), .K(K), .GROUPS(G)) dut (.*);

  initial begin
    wait_reset();
    run_job(2, 2, 2, 1'b1, 8, 1, 10);
    run_job(1, 3, 1, 1'b0, 6, 0, 4);
    chk(64'(n_conv_loop > 0), 1, "calculate->load input loop taken");
    chk(64'(n_line_loop > 0), 1, "output->load bias loop taken");
    chk(64'(n_block_loop > 0), 1, "output->load weight loop taken");
    chk(64'(n_stalls > 0), 1, "SDRAM stall seen");
    chk(64'(n_relu_zero > 0), 1, "ReLU zeroed an output");
    chk(64'(n_neg_pass > 0), 1, "negative output without ReLU");
    $display("mechanisms: conv_loop=%0d line_loop=%0d block_loop=%0d stalls=%0d relu_zero=%0d neg_pass=%0d",
             n_conv_loop, n_line_loop, n_block_loop, n_stalls, n_relu_zero, n_neg_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
