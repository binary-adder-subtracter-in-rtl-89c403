// tb_qca_adder_subtracter: end-to-end test of the adder-subtracter at its
// default size (8 bits, 12-phase latency = 3 clock cycles).
//
// Every combination of a, b and add/subtract is applied once, one per cycle,
// with random idle cycles in between. A scoreboard queue holds the expected
// result and the cycle at which it must appear; each output is compared with
// integer arithmetic (a + b, or a - b with the MSB equal to "no borrow") and
// with the expected arrival cycle. The test also counts how often each
// behaviour occurred (add, subtract, switch between the two, carry out,
// borrow, a carry rippling through all bits, back-to-back results, idle
// cycles) and fails if any never happened.
module tb_qca_adder_subtracter;
  import qca_pkg::*;

  localparam int N          = QCA_WIDTH;
  localparam int LAT_CYCLES = 3;   // 12 clock phases

  logic         clk = 0, rst_n = 0;
  logic         in_valid;
  op_e          op;
  logic [N-1:0] a, b;
  logic         out_valid;
  logic [N:0]   result;

  qca_adder_subtracter dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op), .a(a), .b(b),
    .out_valid(out_valid), .result(result));

  always #5 clk = ~clk;

  typedef struct {
    logic [N:0] value;
    longint     due;
  } expect_t;

  expect_t exp_q[$];
  int  checks = 0, failures = 0;
  longint cycle = 0;
  int  n_add = 0, n_sub = 0, n_switch = 0, n_add_carry = 0, n_sub_noborrow = 0;
  int  n_sub_borrow = 0, n_full_ripple = 0, n_back_to_back = 0, n_idle = 0;
  logic last_out_valid = 0;
  logic have_last_op = 0;
  op_e  last_op = OP_ADD;
  logic stimulus_done = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: sample just before each rising edge.
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        if (last_out_valid) n_back_to_back++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected result %h at cycle %0d", result, cycle);
        end else begin
          expect_t e;
          e = exp_q.pop_front();
          if (result !== e.value || cycle != e.due) begin
            failures++;
            if (failures < 10)
              $display("FAIL cycle %0d result %h expected %h due %0d",
                       cycle, result, e.value, e.due);
          end
        end
      end else if (exp_q.size() != 0 && exp_q[0].due == cycle) begin
        failures++;
        $display("FAIL missing result due at cycle %0d", cycle);
        void'(exp_q.pop_front());
      end
      last_out_valid = out_valid;
    end
  end

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_, input op_e top);
    logic [N:0] ref_v;
    expect_t e;
    @(negedge clk);
    in_valid = 1; a = ta; b = tb_; op = top;
    if (top == OP_ADD) begin
      ref_v = (N+1)'(ta) + (N+1)'(tb_);
      n_add++;
      if (ref_v[N]) n_add_carry++;
      if (ta == '1 && tb_ == 1) n_full_ripple++;
    end else begin
      ref_v = {ta >= tb_, N'(ta - tb_)};
      n_sub++;
      if (ta >= tb_) n_sub_noborrow++; else n_sub_borrow++;
      if (tb_ == 0) n_full_ripple++;   // ~0 + 1 carries through every bit
    end
    if (have_last_op && last_op != top) n_switch++;
    last_op = top; have_last_op = 1;
    e.value = ref_v;
    e.due   = cycle + longint'(LAT_CYCLES);
    exp_q.push_back(e);
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 0; a = N'($urandom); b = N'($urandom);
    n_idle++;
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    in_valid = 0; op = OP_ADD; a = '0; b = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
      logic [2*N:0] w;
      w = (2*N+1)'(v);
      if ($urandom_range(0, 15) == 0) idle();
      apply(w[2*N:N+1], w[N:1], w[0] ? OP_SUB : OP_ADD);
    end
    idle();
    repeat (LAT_CYCLES + 3) idle();
    stimulus_done = 1;

    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end
    $display("events: add=%0d sub=%0d switch=%0d add_carry=%0d sub_noborrow=%0d sub_borrow=%0d full_ripple=%0d back_to_back=%0d idle=%0d",
             n_add, n_sub, n_switch, n_add_carry, n_sub_noborrow, n_sub_borrow,
             n_full_ripple, n_back_to_back, n_idle);
    if (n_add == 0)          begin failures++; $display("FAIL no addition");         end
    if (n_sub == 0)          begin failures++; $display("FAIL no subtraction");      end
    if (n_switch == 0)       begin failures++; $display("FAIL no mode switch");      end
    if (n_add_carry == 0)    begin failures++; $display("FAIL no carry out");        end
    if (n_sub_noborrow == 0) begin failures++; $display("FAIL no sub without borrow"); end
    if (n_sub_borrow == 0)   begin failures++; $display("FAIL no borrow");           end
    if (n_full_ripple == 0)  begin failures++; $display("FAIL no full ripple");      end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back results"); end
    if (n_idle == 0)         begin failures++; $display("FAIL no idle cycle");       end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
