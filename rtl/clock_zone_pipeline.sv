// clock_zone_pipeline: cycle-level model of QCA four-phase clocking.
//
// A QCA circuit is split into clock zones driven by four clocks 90 degrees
// apart. A value is latched by one zone and handed to the next one phase
// later, so a circuit that spans LATENCY_PHASES zones delivers its result
// that many phases after the inputs were applied, and, because every zone is
// released and reloaded once per clock cycle, it accepts a new set of inputs
// every cycle. This module reproduces that timing for a synchronous clock
// whose period is one QCA clock cycle (PHASES_PER_CYCLE phases): it delays a
// data word and its valid flag by ceil(LATENCY_PHASES / PHASES_PER_CYCLE)
// cycles and takes one word per cycle.
// Timing: in_* sampled at a rising edge appear on out_* LAT_CYCLES edges later.
// Reset (active-low, synchronous) clears the valid flags; data is not reset.
module clock_zone_pipeline #(
  parameter int unsigned WIDTH            = 9,
  parameter int unsigned LATENCY_PHASES   = 12,
  parameter int unsigned PHASES_PER_CYCLE = qca_pkg::QCA_PHASES_PER_CYCLE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  localparam int unsigned LAT_CYCLES =
      (LATENCY_PHASES + PHASES_PER_CYCLE - 1) / PHASES_PER_CYCLE;

  if (LAT_CYCLES == 0) begin : g_bad_latency
    $error("clock_zone_pipeline: LATENCY_PHASES must be at least 1");
  end

  logic [WIDTH-1:0] data_q  [LAT_CYCLES];
  logic             valid_q [LAT_CYCLES];

  always_ff @(posedge clk) begin
    data_q[0] <= in_data;
    for (int unsigned k = 1; k < LAT_CYCLES; k++) data_q[k] <= data_q[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < LAT_CYCLES; k++) valid_q[k] <= 1'b0;
    end else begin
      valid_q[0] <= in_valid;
      for (int unsigned k = 1; k < LAT_CYCLES; k++) valid_q[k] <= valid_q[k-1];
    end
  end

  assign out_data  = data_q[LAT_CYCLES-1];
  assign out_valid = valid_q[LAT_CYCLES-1];

endmodule
