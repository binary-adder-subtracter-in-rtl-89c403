// qca_inverter: the QCA inverter, the second primitive device.
//
// In QCA two cells placed diagonally settle to opposite polarisations, so the
// output cell always carries the complement of the input cell. Logically the
// block is y = ~a. Purely combinational.
module qca_inverter (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
