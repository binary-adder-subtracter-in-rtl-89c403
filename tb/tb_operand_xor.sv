// tb_operand_xor: exhaustive check of the 8-bit conditional complement.
module tb_operand_xor;
  logic [7:0] b, x;
  logic       ctrl;
  int checks = 0, failures = 0;

  operand_xor #(.N(8)) dut (.b(b), .ctrl(ctrl), .x(x));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ctrl, b} = 9'(v);
      #1;
      checks++;
      if (x !== (ctrl ? ~b : b)) begin
        failures++;
        $display("FAIL b=%h ctrl=%b x=%h", b, ctrl, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
