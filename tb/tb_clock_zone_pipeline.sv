// tb_clock_zone_pipeline: streams random words through the clock-zone model
// with gaps in the valid flag and checks that each word comes out exactly
// ceil(LATENCY_PHASES/4) cycles later. Runs the 12-phase default (3 cycles)
// and a 5-phase instance (2 cycles).
module tb_clock_zone_pipeline;
  localparam int W = 9;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [W-1:0] in_data;
  logic out_valid_a, out_valid_b;
  logic [W-1:0] out_data_a, out_data_b;
  int checks = 0, failures = 0;
  int cycle = 0;

  clock_zone_pipeline #(.WIDTH(W)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid_a), .out_data(out_data_a));
  clock_zone_pipeline #(.WIDTH(W), .LATENCY_PHASES(5)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid_b), .out_data(out_data_b));

  always #5 clk = ~clk;

  // History of what was applied, indexed by cycle number.
  logic         hist_v [0:4095];
  logic [W-1:0] hist_d [0:4095];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_data = '0;
    for (int i = 0; i < 4096; i++) begin hist_v[i] = 0; hist_d[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (cycle = 0; cycle < 2000; cycle++) begin
      @(negedge clk);
      // Outputs now reflect inputs applied LAT cycles ago.
      if (cycle >= 3) begin
        checks++;
        if (out_valid_a !== hist_v[cycle-3] ||
            (hist_v[cycle-3] && out_data_a !== hist_d[cycle-3])) begin
          failures++;
          if (failures < 10) $display("FAIL A cycle %0d", cycle);
        end
      end
      if (cycle >= 2) begin
        checks++;
        if (out_valid_b !== hist_v[cycle-2] ||
            (hist_v[cycle-2] && out_data_b !== hist_d[cycle-2])) begin
          failures++;
          if (failures < 10) $display("FAIL B cycle %0d", cycle);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = W'($urandom);
      hist_v[cycle] = in_valid;
      hist_d[cycle] = in_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
