// tb_full_adder: exhaustive self-check of full_adder.
// Applies all eight input combinations and compares {cout, s} with the
// integer sum x + y + cin. A watchdog ends the run with a failure if it
// ever stalls.
module tb_full_adder;
  logic x, y, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int unsigned expected;
      {x, y, cin} = 3'(i);
      expected = int'(x) + int'(y) + int'(cin);
      #1;
      checks++;
      if ({cout, s} != 2'(expected)) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b got %b%b expected %0d", x, y, cin, cout, s, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
