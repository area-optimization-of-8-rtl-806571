// Inverter from one GDI cell: G=A, P='1', N='0', so the pMOS pulls the output
// to '1' when A is low and the nMOS to '0' when A is high (a plain CMOS
// inverter). Interface: a in, y out; combinational.
module gdi_inv (
  input  logic a,
  output logic y
);
  gdi_cell u_cell (.g(a), .p(1'b1), .n(1'b0), .d(y));
endmodule
