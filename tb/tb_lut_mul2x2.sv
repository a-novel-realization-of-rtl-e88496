// tb_lut_mul2x2: exhaustive self-check of the 2x2 multiplexer/LUT multiplier.
// All 16 operand pairs are applied and the output is compared with the
// integer product a*b. The worked example a = b = 11 (output 9, read from
// the last table entry) is checked separately. A watchdog ends the run with
// a failure if it ever stalls.
module tb_lut_mul2x2;
  logic [1:0] a, b;
  logic [3:0] o;
  int checks = 0, failures = 0;

  lut_mul2x2 dut (.a(a), .b(b), .o(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (int'(o) != i * j) begin
          failures++;
          $display("FAIL a=%0d b=%0d got %0d expected %0d", i, j, o, i * j);
        end
      end
    end
    a = 2'b11;
    b = 2'b11;
    #1;
    checks++;
    if (o != 4'd9) begin
      failures++;
      $display("FAIL example 11 x 11 gave %0d, expected 9", o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
