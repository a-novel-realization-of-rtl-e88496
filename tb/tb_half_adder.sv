// tb_half_adder: exhaustive self-check of half_adder.
// Applies all four input pairs and compares {cout, s} with the integer sum
// x + y. A watchdog ends the run with a failure if it ever stalls.
module tb_half_adder;
  logic x, y, s, cout;
  int checks = 0, failures = 0;

  half_adder dut (.x(x), .y(y), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int unsigned expected;
      {x, y} = 2'(i);
      expected = int'(x) + int'(y);
      #1;
      checks++;
      if ({cout, s} != 2'(expected)) begin
        failures++;
        $display("FAIL x=%b y=%b got %b%b expected %0d", x, y, cout, s, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
