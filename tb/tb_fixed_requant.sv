// tb_fixed_requant: random accumulator values, shifts in both directions and
// ReLU on/off, compared with a floor-divide/multiply reference.
module tb_fixed_requant;
  logic signed [31:0] acc;
  logic signed [6:0]  shift;
  logic               relu;
  logic signed [15:0] q;
  int checks = 0, failures = 0;
  int relu_zeroed = 0;

  fixed_requant #(.W(16), .ACC_W(32), .SW(7)) dut (.acc, .shift, .relu, .q);

  function automatic logic signed [15:0] ref_q(input logic signed [31:0] v, input int s,
                                                input logic r);
    longint t;
    if (r && v < 0) return 16'sd0;
    t = longint'(v);
    if (s >= 0) begin
      // floor division by 2^s
      longint d = longint'(1) << s;
      t = (t >= 0) ? t / d : -((-t + d - 1) / d);
    end else t = t * (longint'(1) << (-s));
    return t[15:0];
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      acc   = 32'($urandom);
      shift = 7'($signed(int'($urandom % 31) - 10));
      relu  = 1'($urandom);
      #1;
      checks++;
      if (relu && acc < 0) relu_zeroed++;
      if (q !== ref_q(acc, int'(shift), relu)) begin
        failures++;
        $display("FAIL acc=%0d shift=%0d relu=%0d got %0d exp %0d", acc, shift, relu, q,
                 ref_q(acc, int'(shift), relu));
      end
    end
    checks++;
    if (relu_zeroed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
