// Exhaustive test of the radix-2 Booth encoder. For every 8-bit multiplier
// value it checks each x/z pair against the pair (mr[i], mr[i-1]) with
// mr[-1] = 0, and checks that the recoded digits z ? (x ? -1 : +1) : 0,
// weighted by 2^i, add up to mr read as a signed number.
module tb_booth_encoder;
  timeunit 1ns; timeprecision 1ns;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0] mr, x, z;
  int value;
  logic prev;

  booth_encoder #(.N(N)) dut (.mr(mr), .x(x), .z(z));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      mr = N'(k);
      #1;
      value = 0;
      for (int i = 0; i < N; i++) begin
        prev = (i == 0) ? 1'b0 : mr[i-1];
        checks++;
        if (x[i] !== (mr[i] && !prev) || z[i] !== (mr[i] != prev)) begin
          failures++;
          $display("FAIL mr=%b bit %0d x=%b z=%b", mr, i, x[i], z[i]);
        end
        if (z[i]) value += (x[i] ? -1 : 1) * (1 << i);
      end
      checks++;
      if (value != int'($signed(mr))) begin
        failures++;
        $display("FAIL mr=%b digits sum to %0d", mr, value);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
