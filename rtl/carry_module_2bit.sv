// carry_module_2bit: carry logic of one 2-bit slice of the ripple adder.
//
// For bit pair (i+1, i) with carry-in c_i it produces
//   c_{i+1} = M(a_i, b_i, c_i)
//   c_{i+2} = M( M(a_{i+1}, b_{i+1}, a_i), M(a_{i+1}, b_{i+1}, b_i), c_i )
// The two inner majority gates depend only on the operands, so they settle
// before the carry arrives; the incoming carry then reaches c_{i+2} through a
// single majority gate. That is how the carry crosses two bit positions with
// the delay of one gate. When a_{i+1} = b_{i+1} the inner gates both equal that
// bit (generate or kill); when they differ the inner gates pass a_i and b_i and
// the outer gate becomes the carry of bit i, propagated.
// The one-gate-per-two-bits property comes from the design; the exact gate
// equations are the standard formulation of this adder family.
// Interface: a, b are the two operand bits of the slice, cin is c_i.
// Purely combinational.
module carry_module_2bit (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic       c1,   // c_{i+1}
  output logic       c2    // c_{i+2}
);

  logic m_a, m_b;

  majority_gate u_c1  (.a(a[0]), .b(b[0]), .c(cin), .y(c1));
  majority_gate u_ma  (.a(a[1]), .b(b[1]), .c(a[0]), .y(m_a));
  majority_gate u_mb  (.a(a[1]), .b(b[1]), .c(b[0]), .y(m_b));
  majority_gate u_c2  (.a(m_a),  .b(m_b),  .c(cin),  .y(c2));

endmodule
