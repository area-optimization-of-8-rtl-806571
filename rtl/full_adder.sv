// Full adder (3:2 compressor) from GDI gates.
// The propagate signal p = a XOR b is formed first; the sum is p XOR ci and
// the carry comes from a single GDI cell used as a multiplexer: when p is 1
// the carry equals ci, otherwise a and b are equal and the carry equals a,
//   co = p ? ci : a   (GDI cell with G=p, N=ci, P=a).
// The internal arrangement is this design's own; only the full-adder
// function is prescribed. Interface: a, b, ci in; s, co out; combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  gdi_xor2 u_xor_p   (.a(a), .b(b),  .y(p));
  gdi_xor2 u_xor_s   (.a(p), .b(ci), .y(s));
  gdi_cell u_cell_co (.g(p), .p(a),  .n(ci), .d(co));
endmodule
