// Radix-2 Booth encoder.
//
// Each bit i of the multiplier MR is recoded from the pair (mr[i], mr[i-1]),
// with mr[-1] = '0', into two control signals:
//   x[i] = mr[i] AND NOT mr[i-1]   -> the row takes -MD   (digit -1)
//   z[i] = mr[i] XOR mr[i-1]       -> the row is non-zero (digit +1 or -1)
// so the Booth digit of row i is z ? (x ? -1 : +1) : 0 and
// sum_i digit_i * 2^i equals MR read as a two's complement number.
// Gate count: N XOR, N AND and N-1 inverters (the inverted previous bit of
// the LSB is the constant '1').
//
// Interface: mr (N bits) in; x, z (N bits each) out. Combinational, one gate
// level for z and two for x.
module booth_encoder #(
  parameter int unsigned N = gdi_mult_pkg::MULT_N
) (
  input  logic [N-1:0] mr,
  output logic [N-1:0] x,
  output logic [N-1:0] z
);
  logic [N-1:0] prev_n;     // NOT mr[i-1]

  assign prev_n[0] = 1'b1;  // previous bit of the LSB is '0'
  for (genvar i = 1; i < N; i++) begin : g_inv
    gdi_inv u_inv (.a(mr[i-1]), .y(prev_n[i]));
  end

  // z[0] = mr[0] XOR '0'
  gdi_xor2 u_xor0 (.a(mr[0]), .b(1'b0), .y(z[0]));
  for (genvar i = 1; i < N; i++) begin : g_xor
    gdi_xor2 u_xor (.a(mr[i]), .b(mr[i-1]), .y(z[i]));
  end

  for (genvar i = 0; i < N; i++) begin : g_and
    gdi_and2 u_and (.a(mr[i]), .b(prev_n[i]), .y(x[i]));
  end
endmodule
