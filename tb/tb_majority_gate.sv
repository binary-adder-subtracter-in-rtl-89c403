// tb_majority_gate: exhaustive check of the three-input majority gate
// against a count of ones (output is 1 when at least two inputs are 1).
module tb_majority_gate;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  majority_gate dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== (($countones(3'(v)) >= 2) ? 1'b1 : 1'b0)) begin
        failures++;
        $display("FAIL M(%b,%b,%b)=%b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
