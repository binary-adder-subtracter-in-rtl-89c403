// tb_qca_inverter: checks both input polarisations of the inverter.
module tb_qca_inverter;
  logic a, y;
  int checks = 0, failures = 0;

  qca_inverter dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      a = 1'(v);
      #1;
      checks++;
      if (y !== (v == 0)) begin
        failures++;
        $display("FAIL inv(%b)=%b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
