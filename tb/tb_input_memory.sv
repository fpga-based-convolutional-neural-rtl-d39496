// tb_input_memory: writes a random 7x7x8 tile word by word (channel, pixel)
// and checks that each read returns the whole 7x7 slice of one channel one
// cycle after the address.
module tb_input_memory;
  localparam int TILE = 7, CH = 8, NP = TILE * TILE;
  logic clk = 0;
  logic wr_en;
  logic [2:0] wr_ch, rd_ch;
  logic [5:0] wr_pos;
  logic signed [15:0] wr_data;
  logic signed [15:0] rd_pix [NP];
  logic signed [15:0] model [CH][NP];
  int checks = 0, failures = 0, cycles = 0;

  input_memory #(.W(16), .TILE(TILE), .CH(CH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wr_en = 0; wr_ch = 0; wr_pos = 0; wr_data = 0; rd_ch = 0;
    @(negedge clk);
    for (int c = 0; c < CH; c++)
      for (int p = 0; p < NP; p++) begin
        wr_en = 1; wr_ch = 3'(c); wr_pos = 6'(p); wr_data = 16'($urandom);
        model[c][p] = wr_data;
        @(negedge clk);
      end
    wr_en = 0;
    for (int k = 0; k < 3 * CH; k++) begin
      int c;
      c = $urandom % CH;
      rd_ch = 3'(c);
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (rd_pix[p] !== model[c][p]) begin
          failures++; $display("FAIL ch %0d pix %0d got %0d exp %0d", c, p, rd_pix[p], model[c][p]);
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
