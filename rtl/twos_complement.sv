// Two's complement circuit: neg_md = -md.
//
// Each bit of the multiplicand is inverted (N GDI inverters) and one is added
// through a chain of N half adders: the first adds a constant '1' to ~md[0],
// each later one adds the carry of the one before. This gives the low N bits
// of -md. The result is one bit wider than md: neg_md[N] = ~md[N-1] XOR
// (carry out of the last half adder). That ninth bit is an addition of this
// design, needed so that -md is representable when md is the most negative
// value (md = -128 gives neg_md = +128).
//
// Interface: md (N bits, two's complement) in, neg_md (N+1 bits) out.
// Combinational; the delay is a ripple through N half adders.
module twos_complement #(
  parameter int unsigned N = gdi_mult_pkg::MULT_N
) (
  input  logic [N-1:0] md,
  output logic [N:0]   neg_md
);
  logic [N-1:0] md_n;
  logic [N:0]   carry;

  assign carry[0] = 1'b1;

  for (genvar i = 0; i < N; i++) begin : g_bit
    gdi_inv    u_inv (.a(md[i]), .y(md_n[i]));
    half_adder u_ha  (.a(md_n[i]), .b(carry[i]), .s(neg_md[i]), .c(carry[i+1]));
  end

  gdi_xor2 u_xor_sign (.a(md_n[N-1]), .b(carry[N]), .y(neg_md[N]));
endmodule
