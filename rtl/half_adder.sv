// Half adder from GDI gates: sum = a XOR b, carry = a AND b.
// Interface: a, b in; s (sum), c (carry) out; combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  gdi_xor2 u_xor (.a(a), .b(b), .y(s));
  gdi_and2 u_and (.a(a), .b(b), .y(c));
endmodule
