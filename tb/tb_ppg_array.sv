// Random test of the complete partial products generator at its default
// sizes: with random md and random Booth controls per row, every row must
// read (as a signed number) 0, +md or -md as its own x/z pair selects. This
// also catches rows wired to the wrong control pair.
module tb_ppg_array;
  timeunit 1ns; timeprecision 1ns;
  int checks = 0, failures = 0;
  logic [7:0]  md, x, z;
  logic [8:0]  neg_md;
  logic [15:0] pp [8];
  int expected;

  ppg_array dut (.md(md), .neg_md(neg_md), .x(x), .z(z), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      md     = 8'($urandom);
      neg_md = 9'(-int'($signed(md)));
      x      = 8'($urandom);
      z      = 8'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        expected = !z[i] ? 0 : (x[i] ? -int'($signed(md)) : int'($signed(md)));
        checks++;
        if (int'($signed(pp[i])) != expected) begin
          failures++;
          $display("FAIL row %0d md=%0d x=%b z=%b pp=%0d", i, $signed(md), x[i], z[i], $signed(pp[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
