// tb_multiplier_top: end-to-end check of both multipliers at their default
// sizes.
// Every one of the 256 operand pairs is applied to the LUT based multiplier
// and, in a different order, to the partial product multiplier at the same
// time, so that the two halves are seen to be independent. Each product is
// compared with the integer product. The run also counts the mechanisms of
// each multiplier and fails if one never happened:
//   - LUT multiplier: every select value 00/01/10/11 of each of the four
//     2x2 multiplexers (11 being the table read of 3*B), and a carry that
//     ripples into the top product bit of the adder network;
//   - partial product multiplier: for each of its three stages, both the
//     addition and the bypass taken when the partial product is zero.
// The two worked examples, 11 x 11 = 9 on one 2x2 cell and
// 0101 x 1111 = 75 on the partial product multiplier, are checked too.
// A watchdog ends the run with a failure if it ever stalls.
module tb_multiplier_top;
  logic [3:0] p1_a, p1_b, p2_a, p2_b;
  logic [7:0] p1_o, p2_c;
  int checks = 0, failures = 0;
  int sel_seen [4][4];
  int top_carry = 0;
  int added [1:3];
  int bypassed [1:3];

  multiplier_top dut (
    .p1_a(p1_a), .p1_b(p1_b), .p1_o(p1_o),
    .p2_a(p2_a), .p2_b(p2_b), .p2_c(p2_c)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_mechanisms();
    sel_seen[0][dut.u_lut_mul.u_mul_ll.a]++;
    sel_seen[1][dut.u_lut_mul.u_mul_hl.a]++;
    sel_seen[2][dut.u_lut_mul.u_mul_lh.a]++;
    sel_seen[3][dut.u_lut_mul.u_mul_hh.a]++;
    if (dut.u_lut_mul.c2[4]) top_carry++;
    for (int k = 1; k < 4; k++) begin
      if (dut.u_pp_mul.add_en[k]) added[k]++;
      else bypassed[k]++;
    end
  endtask

  initial begin
    foreach (sel_seen[m, s]) sel_seen[m][s] = 0;
    foreach (added[k]) begin
      added[k] = 0;
      bypassed[k] = 0;
    end

    for (int n = 0; n < 256; n++) begin
      int i1, j1, i2, j2;
      i1 = n / 16;
      j1 = n % 16;
      i2 = (255 - n) % 16;
      j2 = (255 - n) / 16;
      p1_a = 4'(i1);
      p1_b = 4'(j1);
      p2_a = 4'(i2);
      p2_b = 4'(j2);
      #1;
      checks++;
      if (int'(p1_o) != i1 * j1) begin
        failures++;
        $display("FAIL LUT multiplier %0d x %0d gave %0d", i1, j1, p1_o);
      end
      checks++;
      if (int'(p2_c) != i2 * j2) begin
        failures++;
        $display("FAIL partial product multiplier %0d x %0d gave %0d", i2, j2, p2_c);
      end
      count_mechanisms();
    end

    // Worked examples.
    p1_a = 4'b0011;
    p1_b = 4'b0011;
    p2_a = 4'b0101;
    p2_b = 4'b1111;
    #1;
    checks++;
    if (dut.u_lut_mul.u_mul_ll.o != 4'd9) begin
      failures++;
      $display("FAIL 2x2 cell 11 x 11 gave %0d", dut.u_lut_mul.u_mul_ll.o);
    end
    checks++;
    if (p2_c != 8'b01001011) begin
      failures++;
      $display("FAIL 0101 x 1111 gave %b", p2_c);
    end

    foreach (sel_seen[m, s]) begin
      checks++;
      if (sel_seen[m][s] == 0) begin
        failures++;
        $display("FAIL 2x2 cell %0d never selected input %0d", m, s);
      end
    end
    $display("adder network: carry into the top bit %0d times", top_carry);
    checks++;
    if (top_carry == 0) begin
      failures++;
      $display("FAIL no carry ever reached the top product bit");
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
