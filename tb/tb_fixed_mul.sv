// tb_fixed_mul: checks the dynamic fixed-point multiplier against the worked
// example 3.625 x 3 = 10.875 and against an integer reference model that
// computes value(a)*value(b) scaled to the result format for random operands
// and random binary-point positions.
module tb_fixed_mul;
  logic signed [15:0] a, b, result;
  logic signed [31:0] prod;
  logic [3:0] ia, ib, ir;
  int checks = 0, failures = 0;

  fixed_mul #(.W(16), .DW(4)) dut (.a, .b, .int_a(ia), .int_b(ib), .int_r(ir), .prod, .result);

  function automatic logic signed [15:0] ref_mul(input logic signed [15:0] x,
      input logic signed [15:0] y, input int fa, input int fb, input int fr);
    // fraction bits: product has fa+fb, result wants fr
    longint p;
    p = longint'(x) * longint'(y);
    if (fa + fb >= fr) p = p >>> (fa + fb - fr);
    else               p = p <<< (fr - fa - fb);
    return p[15:0];
  endfunction

  initial begin
    // 3.625 with 3 integer digits, 3 with 2 integer digits, result with 4
    a = 16'(int'(3.625 * 4096)); b = 16'(3 * 8192); ia = 3; ib = 2; ir = 4;
    #1;
    checks++;
    if (result !== 16'(int'(10.875 * 2048))) begin
      failures++; $display("FAIL example: %0d", result);
    end
    for (int i = 0; i < 2000; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      ia = 4'($urandom); ib = 4'($urandom); ir = 4'($urandom);
      #1;
      checks += 2;
      if (prod !== 32'(longint'(a) * longint'(b))) begin
        failures++; $display("FAIL prod %0d*%0d", a, b);
      end
      if (result !== ref_mul(a, b, 15 - ia, 15 - ib, 15 - ir)) begin
        failures++;
        $display("FAIL %0d*%0d ia=%0d ib=%0d ir=%0d got %0d", a, b, ia, ib, ir, result);
      end
    end
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
