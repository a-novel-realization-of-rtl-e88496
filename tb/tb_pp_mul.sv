// tb_pp_mul: self-check of the zero-skipping partial product multiplier.
// The default 4-bit instance is checked exhaustively (256 pairs) against the
// integer product, and so is an 8-bit instance (65536 pairs, 7 stages). For
// the 4-bit instance it also checks, for every pair, that stage k used its
// adder exactly when its partial product B*A[k] is non-zero, and counts how
// often each stage added and how often it bypassed the adder: a stage that
// never did one of the two counts as a failure. The worked example
// A = 0101, B = 1111 must give 01001011 (75). A watchdog ends the run with a
// failure if it ever stalls.
module tb_pp_mul;
  logic [3:0] a4, b4;
  logic [7:0] c4;
  logic [7:0] a8, b8;
  logic [15:0] c8;
  int checks = 0, failures = 0;
  int added [1:3];
  int bypassed [1:3];

  pp_mul dut4 (.a(a4), .b(b4), .c(c4));
  pp_mul #(.N(8)) dut8 (.a(a8), .b(b8), .c(c8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (added[k]) begin
      added[k] = 0;
      bypassed[k] = 0;
    end
    a8 = '0;
    b8 = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (int'(c4) != i * j) begin
          failures++;
          $display("FAIL N=4 a=%0d b=%0d got %0d expected %0d", i, j, c4, i * j);
        end
        for (int k = 1; k < 4; k++) begin
          logic expect_add;
          expect_add = (j != 0) && a4[k];
          checks++;
          if (dut4.add_en[k] != expect_add) begin
            failures++;
            $display("FAIL N=4 a=%0d b=%0d stage %0d add=%b expected %b",
                     i, j, k, dut4.add_en[k], expect_add);
          end
          if (dut4.add_en[k]) added[k]++;
          else bypassed[k]++;
        end
      end
    end

    a4 = 4'b0101;
    b4 = 4'b1111;
    #1;
    checks++;
    if (c4 != 8'b01001011) begin
      failures++;
      $display("FAIL example 0101 x 1111 gave %b, expected 01001011", c4);
    end

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if (int'(c8) != i * j) begin
          failures++;
          if (failures < 20)
            $display("FAIL N=8 a=%0d b=%0d got %0d expected %0d", i, j, c8, i * j);
        end
      end
    end

    for (int k = 1; k < 4; k++) begin
      $display("stage %0d: added %0d times, bypassed %0d times", k, added[k], bypassed[k]);
      checks++;
      if (added[k] == 0 || bypassed[k] == 0) begin
        failures++;
        $display("FAIL stage %0d did not both add and bypass", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
