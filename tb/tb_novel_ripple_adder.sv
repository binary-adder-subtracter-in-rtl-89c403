// tb_novel_ripple_adder: exhaustive check of the 8-bit adder (every a, b
// and carry-in) and a random check of a 4-bit and a 32-bit instance against
// integer addition.
module tb_novel_ripple_adder;
  logic [7:0]  a8, b8, s8;
  logic        cin8, co8;
  logic [3:0]  a4, b4, s4;
  logic        cin4, co4;
  logic [31:0] a32, b32, s32;
  logic        cin32, co32;
  int checks = 0, failures = 0;

  novel_ripple_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .cin(cin8),  .s(s8),  .cout(co8));
  novel_ripple_adder #(.N(4))  dut4  (.a(a4),  .b(b4),  .cin(cin4),  .s(s4),  .cout(co4));
  novel_ripple_adder #(.N(32)) dut32 (.a(a32), .b(b32), .cin(cin32), .s(s32), .cout(co32));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0; b4 = '0; cin4 = 0; a32 = '0; b32 = '0; cin32 = 0;
    for (int v = 0; v < (1 << 17); v++) begin
      logic [8:0] t;
      {a8, b8, cin8} = 17'(v);
      #1;
      t = 9'(a8) + 9'(b8) + 9'(cin8);
      checks++;
      if ({co8, s8} !== t) begin
        failures++;
        if (failures < 10) $display("FAIL8 %h+%h+%b = %h exp %h", a8, b8, cin8, {co8, s8}, t);
      end
    end
    for (int v = 0; v < 512; v++) begin
      logic [4:0] t;
      {a4, b4, cin4} = 9'(v);
      #1;
      t = 5'(a4) + 5'(b4) + 5'(cin4);
      checks++;
      if ({co4, s4} !== t) begin
        failures++;
        if (failures < 10) $display("FAIL4 %h+%h+%b", a4, b4, cin4);
      end
    end
    for (int v = 0; v < 20000; v++) begin
      logic [32:0] t;
      a32 = $urandom; b32 = $urandom; cin32 = 1'($urandom);
      if (v < 4) begin a32 = '1; b32 = 32'(v & 1); cin32 = 1'(v >> 1); end
      #1;
      t = 33'(a32) + 33'(b32) + 33'(cin32);
      checks++;
      if ({co32, s32} !== t) begin
        failures++;
        if (failures < 10) $display("FAIL32 %h+%h+%b", a32, b32, cin32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
