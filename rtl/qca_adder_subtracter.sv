// qca_adder_subtracter: N-bit two's-complement adder-subtracter built the way
// a quantum-dot cellular automata (QCA) layout builds it, from majority gates
// and inverters only.
//
// Operand b goes through operand_xor, which inverts it when op = OP_SUB; the
// same control bit is the carry-in of the least significant stage. The
// novel_ripple_adder (2-bit carry slices, one majority gate of carry delay per
// two bits) then forms a + b (add) or a + ~b + 1 = a - b (subtract). The result
// is N+1 bits with the carry-out as MSB. For subtraction that MSB is the
// inverted borrow: 1 when a >= b (unsigned).
// The QCA layout needs 12 clock phases (3 clock cycles) from inputs to
// result; clock_zone_pipeline reproduces that timing with clk running at one
// QCA clock cycle per period. A new operation is accepted every cycle.
// Interface: in_valid/op/a/b sampled at a rising clock edge; out_valid/result
// follow LATENCY_PHASES/4 edges later. rst_n is active-low, synchronous.
// The choice of b as the complemented operand and the valid flags are this
// design's own; the structure and latency follow the published QCA design.
module qca_adder_subtracter
  import qca_pkg::*;
#(
  parameter int unsigned N              = QCA_WIDTH,
  parameter int unsigned LATENCY_PHASES = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  op_e          op,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N:0]   result
);

  logic [N-1:0] b_x;
  logic [N-1:0] sum;
  logic         cout;
  logic         ctrl;

  assign ctrl = (op == OP_SUB);

  operand_xor #(.N(N)) u_xor (.b(b), .ctrl(ctrl), .x(b_x));

  novel_ripple_adder #(.N(N)) u_adder (
    .a   (a),
    .b   (b_x),
    .cin (ctrl),
    .s   (sum),
    .cout(cout)
  );

  clock_zone_pipeline #(
    .WIDTH           (N + 1),
    .LATENCY_PHASES  (LATENCY_PHASES),
    .PHASES_PER_CYCLE(QCA_PHASES_PER_CYCLE)
  ) u_zones (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_data  ({cout, sum}),
    .out_valid(out_valid),
    .out_data (result)
  );

endmodule
