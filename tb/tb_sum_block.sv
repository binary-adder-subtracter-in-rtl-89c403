// tb_sum_block: exhaustive check of the 8-bit sum block. The testbench
// computes the true ripple carries itself and expects s = a ^ b ^ c[N-1:0].
module tb_sum_block;
  localparam int N = 8;
  logic [N-1:0] a, b, s;
  logic [N:0]   c;
  logic         cin;
  int checks = 0, failures = 0;

  sum_block #(.N(N)) dut (.a(a), .b(b), .c(c), .s(s));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      logic [N:0] t;
      {a, b, cin} = 17'(v);
      c[0] = cin;
      for (int i = 0; i < N; i++)
        c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
      #1;
      t = (N+1)'(a) + (N+1)'(b) + (N+1)'(cin);
      checks++;
      if (s !== t[N-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%b s=%h exp=%h", a, b, cin, s, t[N-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
