// Exhaustive truth-table test of the GDI basic cell (D = G ? N : P).
// All 8 input combinations are applied, one per nanosecond, and every
// output is compared with the Boolean function written out independently
// below. A watchdog ends the run with a failure if it does not finish.
module tb_gdi_cell;
  timeunit 1ns; timeprecision 1ns;
  int checks = 0, failures = 0;
  logic [2:0] v;
  logic g;
  logic p;
  logic n;
  logic d;

  gdi_cell dut (.g(g), .p(p), .n(n), .d(d));

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
      g = v[0]; p = v[1]; n = v[2];
      #1;
      checks++;
      if (d !== 1'((v[0] ? v[2] : v[1]))) begin
        failures++;
        $display("FAIL gdi_cell inputs=%b d=%b expected %b", v, d, 1'((v[0] ? v[2] : v[1])));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
