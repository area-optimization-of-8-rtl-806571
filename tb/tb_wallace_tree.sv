// Random test of the Wallace tree adder at its default sizes (8 rows of 16
// bits, 23-bit sum). Rows are random, then all-ones (every column full, the
// longest carry chains), and the sum is compared with the sum of
// row_i * 2^i modulo 2^23 computed here with ordinary integer arithmetic.
module tb_wallace_tree;
  timeunit 1ns; timeprecision 1ns;
  localparam int N = 8, PP_W = 16, W = PP_W + N - 1;
  int checks = 0, failures = 0;
  logic [PP_W-1:0] pp [N];
  logic [W-1:0]    sum;
  logic [W-1:0]    expected;

  wallace_tree #(.N(N), .PP_W(PP_W)) dut (.pp(pp), .sum(sum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint acc = 0;
    #1;
    for (int i = 0; i < N; i++) acc += longint'(pp[i]) << i;
    expected = W'(acc);
    checks++;
    if (sum !== expected) begin
      failures++;
      $display("FAIL sum=%h expected %h", sum, expected);
    end
  endtask

  initial begin
    for (int k = 0; k < 5000; k++) begin
      for (int i = 0; i < N; i++) pp[i] = PP_W'($urandom);
      check();
    end
    for (int i = 0; i < N; i++) pp[i] = '1;
    check();
    for (int i = 0; i < N; i++) pp[i] = '0;
    check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
