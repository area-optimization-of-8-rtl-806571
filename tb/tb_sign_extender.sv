// Exhaustive test of the sign extender at its default widths (9 to 16 bits):
// the output must equal the input read as a signed number.
module tb_sign_extender;
  timeunit 1ns; timeprecision 1ns;
  int checks = 0, failures = 0;
  logic [8:0]  d;
  logic [15:0] q;

  sign_extender dut (.d(d), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 512; k++) begin
      d = 9'(k);
      #1;
      checks++;
      if (int'($signed(q)) != int'($signed(d))) begin
        failures++;
        $display("FAIL d=%b q=%b", d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
