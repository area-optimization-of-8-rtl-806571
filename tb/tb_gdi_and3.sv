// Exhaustive truth-table test of the three-input AND.
// All 8 input combinations are applied, one per nanosecond, and every
// output is compared with the Boolean function written out independently
// below. A watchdog ends the run with a failure if it does not finish.
module tb_gdi_and3;
  timeunit 1ns; timeprecision 1ns;
  int checks = 0, failures = 0;
  logic [2:0] v;
  logic a;
  logic b;
  logic c;
  logic y;

  gdi_and3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      v = 3'(k);
      a = v[0]; b = v[1]; c = v[2];
      #1;
      checks++;
      if (y !== 1'((v[0] & v[1] & v[2]))) begin
        failures++;
        $display("FAIL gdi_and3 inputs=%b y=%b expected %b", v, y, 1'((v[0] & v[1] & v[2])));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
