// Two-input XOR in GDI logic: an inverter forms B', and a GDI cell with G=A,
// P=B and N=B' selects B when A is low and B' when A is high, i.e. A XOR B.
// This particular cell arrangement is this design's own; only the function
// is fixed. Interface: a, b in, y out; combinational.
module gdi_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  logic b_n;
  gdi_inv  u_inv  (.a(b), .y(b_n));
  gdi_cell u_cell (.g(a), .p(b), .n(b_n), .d(y));
endmodule
