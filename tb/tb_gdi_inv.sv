// Exhaustive truth-table test of the GDI inverter.
// All 2 input combinations are applied, one per nanosecond, and every
// output is compared with the Boolean function written out independently
// below. A watchdog ends the run with a failure if it does not finish.
module tb_gdi_inv;
  timeunit 1ns; timeprecision 1ns;
  int checks = 0, failures = 0;
  logic [0:0] v;
  logic a;
  logic y;

  gdi_inv dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      v = 1'(k);
      a = v[0];
      #1;
      checks++;
      if (y !== 1'(!v[0])) begin
        failures++;
        $display("FAIL gdi_inv inputs=%b y=%b expected %b", v, y, 1'(!v[0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
