// operand_xor: conditional complement of operand b for subtraction.
//
// Every bit of b is XORed with the add/subtract control: with ctrl = 0 the
// operand passes unchanged, with ctrl = 1 it is inverted (one's complement;
// the +1 of two's complement comes from the adder's carry-in). QCA has no
// XOR device, so each bit is built from majority gates and inverters:
//   x = M( M(b, ~ctrl, 0), M(~b, ctrl, 0), 1 )  =  (b & ~ctrl) | (~b & ctrl).
// Purely combinational.
module operand_xor #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] b,
  input  logic         ctrl,
  output logic [N-1:0] x
);

  logic n_ctrl;
  qca_inverter u_inv_ctrl (.a(ctrl), .y(n_ctrl));

  for (genvar i = 0; i < N; i++) begin : g_bit
    logic n_b, and_l, and_r;
    qca_inverter  u_inv_b (.a(b[i]), .y(n_b));
    majority_gate u_and_l (.a(b[i]),  .b(n_ctrl), .c(1'b0),  .y(and_l));
    majority_gate u_and_r (.a(n_b),   .b(ctrl),   .c(1'b0),  .y(and_r));
    majority_gate u_or    (.a(and_l), .b(and_r),  .c(1'b1),  .y(x[i]));
  end

endmodule
