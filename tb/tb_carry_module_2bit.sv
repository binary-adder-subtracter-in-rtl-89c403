// tb_carry_module_2bit: exhaustive check of the 2-bit carry slice. The
// expected carries are the carry outputs of a 2-bit integer addition.
module tb_carry_module_2bit;
  logic [1:0] a, b;
  logic       cin, c1, c2;
  int checks = 0, failures = 0;

  carry_module_2bit dut (.a(a), .b(b), .cin(cin), .c1(c1), .c2(c2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int unsigned lo, full;
      {a, b, cin} = 5'(v);
      #1;
      lo   = 32'(a[0]) + 32'(b[0]) + 32'(cin);
      full = 32'(a) + 32'(b) + 32'(cin);
      checks++;
      if (c1 !== lo[1] || c2 !== full[2]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b c1=%b c2=%b", a, b, cin, c1, c2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
