// carry_block: carry network of the N-bit ripple adder.
//
// N/2 carry_module_2bit slices are chained; the even carry c_{2k+2} of one
// slice is the carry-in of the next. Along the chain the carry passes one
// majority gate per two bits, so the worst-case carry path is N/2 majority
// gates. c[0] is the carry-in and c[N] the carry-out; the odd carries come
// from the first majority gate of each slice and feed only the sum block.
// N must be even. Purely combinational.
module carry_block #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N:0]   c
);

  if (N % 2 != 0 || N == 0) begin : g_bad_width
    $error("carry_block: N must be even and non-zero");
  end

  assign c[0] = cin;

  for (genvar k = 0; k < N / 2; k++) begin : g_slice
    carry_module_2bit u_slice (
      .a  (a[2*k+1 -: 2]),
      .b  (b[2*k+1 -: 2]),
      .cin(c[2*k]),
      .c1 (c[2*k+1]),
      .c2 (c[2*k+2])
    );
  end

endmodule
