// Exhaustive test of the two's complement circuit: for all 256 values of md
// the 9-bit output must equal the arithmetic negation of md read as a signed
// number, including md = -128 (result +128) and md = 0 (result 0).
module tb_twos_complement;
  timeunit 1ns; timeprecision 1ns;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0] md;
  logic [N:0]   neg_md;
  logic signed [N:0] expected;

  twos_complement #(.N(N)) dut (.md(md), .neg_md(neg_md));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      md = N'(k);
      #1;
      expected = -(N+1)'($signed(md));
      checks++;
      if (neg_md !== expected) begin
        failures++;
        $display("FAIL md=%0d neg_md=%0d expected %0d", $signed(md), $signed(neg_md), expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
