// Exhaustive test of one partial product row at the default sizes (N=8,
// 16-bit row). For every md and every (x, z) pair, with -md supplied by the
// testbench, the row read as a signed number must be 0 (z=0), +md (z=1, x=0)
// or -md (z=1, x=1).
module tb_pp_row;
  timeunit 1ns; timeprecision 1ns;
  int checks = 0, failures = 0;
  logic [7:0]  md;
  logic [8:0]  neg_md;
  logic        x, z;
  logic [15:0] pp;
  int expected;

  pp_row dut (.md(md), .neg_md(neg_md), .x(x), .z(z), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      for (int s = 0; s < 4; s++) begin
        md     = 8'(k);
        neg_md = 9'(-int'($signed(md)));
        {x, z} = 2'(s);
        #1;
        expected = !z ? 0 : (x ? -int'($signed(md)) : int'($signed(md)));
        checks++;
        if (int'($signed(pp)) != expected) begin
          failures++;
          $display("FAIL md=%0d x=%b z=%b pp=%0d expected %0d",
                   $signed(md), x, z, $signed(pp), expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
