// End-to-end test of the GDI Booth multiplier at its default parameters.
//
// First the three operand pairs used to validate the original circuit are
// applied, then all 65536 (md, mr) pairs. Each product is compared with the
// signed product computed by the simulator. Alongside, the test counts how
// often each mechanism of the design was exercised, measured on the
// operands: Booth digits +1, -1 and 0, the negation of md = -128 (which
// needs the ninth bit of -MD), negative products, and a negative first
// partial product (which needs the 16th bit of the row). A mechanism never
// exercised counts as a failure.
module tb_gdi_booth_multiplier;
  timeunit 1ns; timeprecision 1ns;
  int checks = 0, failures = 0;
  logic [7:0]  md, mr;
  logic [15:0] product;
  int n_digit_pos = 0, n_digit_neg = 0, n_digit_zero = 0;
  int n_md_min_neg = 0, n_neg_product = 0, n_neg_row0 = 0;

  gdi_booth_multiplier dut (.md(md), .mr(mr), .product(product));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [7:0] a, input logic [7:0] b);
    int expected;
    logic prev;
    md = a;
    mr = b;
    #1;
    expected = int'($signed(a)) * int'($signed(b));
    checks++;
    if (int'($signed(product)) != expected) begin
      failures++;
      if (failures < 20)
        $display("FAIL md=%0d mr=%0d product=%0d expected %0d",
                 $signed(a), $signed(b), $signed(product), expected);
    end
    for (int i = 0; i < 8; i++) begin
      prev = (i == 0) ? 1'b0 : b[i-1];
      if (b[i] == prev)      n_digit_zero++;
      else if (b[i])       begin
        n_digit_neg++;
        if (a == 8'h80) n_md_min_neg++;
      end
      else                   n_digit_pos++;
    end
    if (expected < 0) n_neg_product++;
    if (b[0] && $signed(a) > 0) n_neg_row0++;
  endtask

  initial begin
    apply(8'b11000100, 8'b00100000);   // -60 * 32
    apply(8'b01001010, 8'b01100100);   // 74 * 100
    apply(8'b11001110, 8'b10100000);   // -50 * -96
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        apply(8'(a), 8'(b));
    $display("digits +1=%0d -1=%0d 0=%0d, -(-128) rows=%0d, negative products=%0d, negative row 0=%0d",
             n_digit_pos, n_digit_neg, n_digit_zero, n_md_min_neg, n_neg_product, n_neg_row0);
    if (n_digit_pos == 0)   begin failures++; $display("FAIL no +1 digit"); end
    if (n_digit_neg == 0)   begin failures++; $display("FAIL no -1 digit"); end
    if (n_digit_zero == 0)  begin failures++; $display("FAIL no 0 digit"); end
    if (n_md_min_neg == 0)  begin failures++; $display("FAIL -(-128) never used"); end
    if (n_neg_product == 0) begin failures++; $display("FAIL no negative product"); end
    if (n_neg_row0 == 0)    begin failures++; $display("FAIL row 0 never negative"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
