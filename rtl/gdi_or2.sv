// Two-input OR in GDI logic. An inverter forms A', which drives the gate of a
// GDI cell wired as the A'+B function with N=B and P='1':
//   D = (A') ? B : 1 = A OR B.
// As for the AND gate, the inverted-input option is used in place of the
// direct A+B option (N='1', P=B) to keep full output levels.
// Interface: a, b in, y out; combinational.
module gdi_or2 (
  input  logic a,
  input  logic b,
  output logic y
);
  logic a_n;
  gdi_inv  u_inv  (.a(a), .y(a_n));
  gdi_cell u_cell (.g(a_n), .p(1'b1), .n(b), .d(y));
endmodule
