// pp_mul: N x N unsigned multiplier that skips the additions of zero partial
// products ("proposed-2").
//
// The partial products are temp(k) = B & {N{A[k-1]}}, k = 1..N, i.e. B times
// one bit of A. The product is built in N-1 stages from the running sum
// r(0) = temp1:
//   c[0] = r(0)[0]
//   stage k (k = 1..N-1):
//     add(k) = (temp(k+1) != 0)
//     r(k)   = add(k) ? temp(k+1) + (r(k-1) >> 1)   (adder used)
//                     : (r(k-1) >> 1)               (adder bypassed)
//     c[k]   = r(k)[0]
//   c[2N-1:N-1] = r(N-1)
// Each stage thus emits one finished product bit and passes the rest on,
// shifted by one place. For N = 4 the running sums r(1), r(2) are the
// temporaries temp5 and temp6 of the flow chart this design follows, and
// the last stage gives c[7:3]. The zero test and its bypass multiplexer
// follow that flow chart; because adding zero changes nothing, the bypass
// never changes the product, only whether the stage's adder result is used.
// The generalisation to N bits with N-1 stages follows the stated rule; the
// width N is a parameter (default 4).
// Interface: a[N-1:0], b[N-1:0] in, c[2N-1:0] = a*b out. Purely
// combinational: N-1 adders in series.
module pp_mul #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c
);
  // Partial products temp(1)..temp(N), stored at index 0..N-1.
  logic [N-1:0] temp [N];
  // Running sum after each stage; r[0] is temp(1) zero-extended.
  logic [N:0]   r    [N];
  // Which stages performed their addition.
  logic [N-1:1] add_en;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      temp[k] = b & {N{a[k]}};
    end
  end

  assign r[0] = {1'b0, temp[0]};
  assign c[0] = r[0][0];

  for (genvar k = 1; k < N; k++) begin : g_stage
    logic [N:0] shifted;
    assign shifted   = r[k-1] >> 1;
    assign add_en[k] = (temp[k] != '0);
    assign r[k]      = add_en[k] ? ({1'b0, temp[k]} + shifted) : shifted;
    if (k < N - 1) begin : g_bit
      assign c[k] = r[k][0];
    end else begin : g_last
      assign c[2*N-1:N-1] = r[k];
    end
  end
endmodule
