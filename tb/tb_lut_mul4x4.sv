// tb_lut_mul4x4: exhaustive self-check of the LUT based 4x4 multiplier.
// All 256 operand pairs are applied and the 8-bit output is compared with
// the integer product a*b. A watchdog ends the run with a failure if it
// ever stalls.
module tb_lut_mul4x4;
  logic [3:0] a, b;
  logic [7:0] o;
  int checks = 0, failures = 0;

  lut_mul4x4 dut (.a(a), .b(b), .o(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (int'(o) != i * j) begin
          failures++;
          $display("FAIL a=%0d b=%0d got %0d expected %0d", i, j, o, i * j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
