// sum_block: sum bits of the N-bit ripple adder.
//
// Each bit uses the usual QCA full-adder sum of three majority gates and two
// inverters:  s_i = M( ~c_{i+1}, c_i, M(a_i, b_i, ~c_i) ).
// The carries come from carry_block; c_{i+1} must be the true carry out of
// bit i, which makes this equal to a_i ^ b_i ^ c_i. The path from a carry to a
// sum bit is two majority gates and one inverter.
// Interface: c[N:0] is the carry vector (c[0] carry-in). Purely combinational.
module sum_block #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N:0]   c,
  output logic [N-1:0] s
);

  for (genvar i = 0; i < N; i++) begin : g_bit
    logic n_cin, n_cout, m_in;
    qca_inverter  u_inv_cin  (.a(c[i]),   .y(n_cin));
    qca_inverter  u_inv_cout (.a(c[i+1]), .y(n_cout));
    majority_gate u_m_in  (.a(a[i]),  .b(b[i]), .c(n_cin), .y(m_in));
    majority_gate u_m_sum (.a(n_cout), .b(c[i]), .c(m_in),  .y(s[i]));
  end

endmodule
