// Exhaustive truth-table test of the GDI two-input XOR.
// All 4 input combinations are applied, one per nanosecond, and every
// output is compared with the Boolean function written out independently
// below. A watchdog ends the run with a failure if it does not finish.
module tb_gdi_xor2;
  timeunit 1ns; timeprecision 1ns;
  int checks = 0, failures = 0;
  logic [1:0] v;
  logic a;
  logic b;
  logic y;

  gdi_xor2 dut (.a(a), .b(b), .y(y));

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
      if (y !== 1'((v[0] ^ v[1]))) begin
        failures++;
        $display("FAIL gdi_xor2 inputs=%b y=%b expected %b", v, y, 1'((v[0] ^ v[1])));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
