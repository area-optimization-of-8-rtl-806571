// Gate Diffusion Input (GDI) basic cell, logic-level model.
//
// The cell is one pMOS and one nMOS transistor sharing the gate input G. The
// pMOS connects the diffusion input P to the output D, the nMOS connects the
// diffusion input N to D. With full-swing inputs the cell is therefore a 2:1
// multiplexer: D = G ? N : P. Every gate of the multiplier is built from this
// cell by tying P and N to signals or to constants, e.g.
//   N='0', P=B, G=A  ->  D = A'B      N=B, P='0', G=A  ->  D = AB
//   N=B,  P='1', G=A ->  D = A'+B     N='1', P=B, G=A  ->  D = A+B
//   N=C,  P=B,  G=A  ->  D = A'B+AC   N='0', P='1', G=A ->  D = A'
// The threshold-voltage drop of a real cell on some input patterns is not
// modelled; the gates built from it add inverters where the real circuit
// would restore the swing.
//
// Interface: g, p, n in, d out; purely combinational.
module gdi_cell (
  input  logic g,
  input  logic p,
  input  logic n,
  output logic d
);
  assign d = g ? n : p;
endmodule
