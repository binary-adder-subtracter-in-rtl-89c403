// novel_ripple_adder: N-bit ripple adder built from 2-bit slices.
//
// The carry block computes all carries, with the carry skipping two bit
// positions per majority gate; the sum block then forms each sum bit from its
// operands and the carries on both sides of it. The worst-case path is
// N/2 majority gates for the carry chain plus the sum logic, roughly half of a
// conventional ripple-carry adder. {cout, s} = a + b + cin. N must be even.
// Purely combinational; the QCA clock-zone latency is modelled at the top.
module novel_ripple_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N:0] c;

  carry_block #(.N(N)) u_carry (.a(a), .b(b), .cin(cin), .c(c));
  sum_block   #(.N(N)) u_sum   (.a(a), .b(b), .c(c),     .s(s));

  assign cout = c[N];

endmodule
