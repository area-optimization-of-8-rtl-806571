// Exhaustive truth-table test of the half adder.
// All 4 input combinations are applied, one per nanosecond, and every
// output is compared with the Boolean function written out independently
// below. A watchdog ends the run with a failure if it does not finish.
module tb_half_adder;
  timeunit 1ns; timeprecision 1ns;
  int checks = 0, failures = 0;
  logic [1:0] v;
  logic a;
  logic b;
  logic s;
  logic c;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      v = 2'(k);
      a = v[0]; b = v[1];
      #1;
      checks++;
      if (s !== 1'((v[0] ^ v[1]))) begin
        failures++;
        $display("FAIL half_adder inputs=%b s=%b expected %b", v, s, 1'((v[0] ^ v[1])));
      end
      checks++;
      if (c !== 1'((v[0] & v[1]))) begin
        failures++;
        $display("FAIL half_adder inputs=%b c=%b expected %b", v, c, 1'((v[0] & v[1])));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
