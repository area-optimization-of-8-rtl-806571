// Three-input AND, as used by the partial product generator to combine one
// multiplicand bit with the two Booth control signals. Built as two GDI
// two-input AND gates in cascade: y = (a AND b) AND c.
// Interface: a, b, c in, y out; combinational.
module gdi_and3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  logic ab;
  gdi_and2 u_and_ab  (.a(a),  .b(b), .y(ab));
  gdi_and2 u_and_abc (.a(ab), .b(c), .y(y));
endmodule
