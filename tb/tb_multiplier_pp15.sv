// Test of the multiplier built with 15-bit partial products (PP_W = 15), the
// row width of the original scheme. Over all 65536 operand pairs it checks
// that the low 15 product bits are always right, and that the full 16-bit
// product is right whenever partial product row 0 is not negative (mr[0] = 0,
// or md <= 0), which includes the three reference operand pairs. It also
// counts the pairs where bit 15 is wrong; this must be exactly the pairs
// with a negative row 0, which is why the default row width is 16.
module tb_multiplier_pp15;
  timeunit 1ns; timeprecision 1ns;
  int checks = 0, failures = 0, n_bit15_wrong = 0, n_row0_neg = 0;
  logic [7:0]  md, mr;
  logic [15:0] product;

  gdi_booth_multiplier #(.N(8), .PP_W(15)) dut (.md(md), .mr(mr), .product(product));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] expected;
    bit row0_neg;
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        md = 8'(a);
        mr = 8'(b);
        #1;
        expected = 16'(int'($signed(md)) * int'($signed(mr)));
        row0_neg = mr[0] && ($signed(md) > 0);
        if (row0_neg) n_row0_neg++;
        if (product[15] != expected[15]) n_bit15_wrong++;
        checks++;
        if (product[14:0] !== expected[14:0] || (!row0_neg && product !== expected)) begin
          failures++;
          if (failures < 20)
            $display("FAIL md=%0d mr=%0d product=%h expected %h", $signed(md), $signed(mr), product, expected);
        end
      end
    end
    $display("bit 15 wrong for %0d pairs, row 0 negative for %0d pairs", n_bit15_wrong, n_row0_neg);
    checks++;
    if (n_bit15_wrong != n_row0_neg) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
