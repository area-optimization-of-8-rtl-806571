// Two-input AND in GDI logic. An inverter forms A', which drives the gate of
// a GDI cell wired as the A'B function with N='0' and P=B:
//   D = (A') ? 0 : B = A AND B.
// Driving the cell through the inverted input, rather than using the direct
// AB option (N=B, P='0'), is the choice made for this gate set to avoid a
// degraded output level. Interface: a, b in, y out; combinational.
module gdi_and2 (
  input  logic a,
  input  logic b,
  output logic y
);
  logic a_n;
  gdi_inv  u_inv  (.a(a), .y(a_n));
  gdi_cell u_cell (.g(a_n), .p(b), .n(1'b0), .d(y));
endmodule
