// tb_carry_block: exhaustive check of the 8-bit carry network plus a random
// check of a 16-bit one. Carry c[i] is bit i of (a mod 2^i)+(b mod 2^i)+cin.
module tb_carry_block;
  localparam int N8 = 8, N16 = 16;
  logic [N8-1:0]  a8, b8;
  logic [N16-1:0] a16, b16;
  logic           cin8, cin16;
  logic [N8:0]    c8;
  logic [N16:0]   c16;
  int checks = 0, failures = 0;

  carry_block #(.N(N8))  dut8  (.a(a8),  .b(b8),  .cin(cin8),  .c(c8));
  carry_block #(.N(N16)) dut16 (.a(a16), .b(b16), .cin(cin16), .c(c16));

  function automatic logic [32:0] ref_carries(input int unsigned n,
      input logic [31:0] a, input logic [31:0] b, input logic cin);
    logic [32:0] c;
    c = '0;
    c[0] = cin;
    for (int unsigned i = 1; i <= n; i++) begin
      logic [33:0] t;
      logic [31:0] mask;
      mask = (32'd1 << (i - 1)) * 2 - 1;
      t = 34'(a & mask) + 34'(b & mask) + 34'(cin);
      c[i] = t[i];
    end
    return c;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; cin16 = 0;
    for (int v = 0; v < (1 << 17); v++) begin
      logic [32:0] e;
      {a8, b8, cin8} = 17'(v);
      #1;
      e = ref_carries(N8, 32'(a8), 32'(b8), cin8);
      checks++;
      if (c8 !== e[N8:0]) begin
        failures++;
        if (failures < 10) $display("FAIL8 a=%h b=%h cin=%b c=%b exp=%b", a8, b8, cin8, c8, e[N8:0]);
      end
    end
    for (int v = 0; v < 20000; v++) begin
      logic [32:0] e;
      a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom);
      #1;
      e = ref_carries(N16, 32'(a16), 32'(b16), cin16);
      checks++;
      if (c16 !== e[N16:0]) begin
        failures++;
        if (failures < 10) $display("FAIL16 a=%h b=%h cin=%b", a16, b16, cin16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
