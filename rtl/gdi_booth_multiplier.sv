// N x N signed multiplier in Gate Diffusion Input (GDI) logic, with radix-2
// Booth recoding and a Wallace tree.
//
// Data flow (all combinational, no clock):
//   md --> twos_complement --> neg_md (-MD, N+1 bits)
//   mr --> booth_encoder   --> x, z (one pair per multiplier bit)
//   md, neg_md, x, z --> ppg_array --> N partial products of PP_W bits, row i
//                         being +MD, -MD or 0 as chosen by x[i], z[i]
//   partial products --> wallace_tree --> sum of row_i * 2^i (PP_W+N-1 bits)
//   product = low 2N bits of that sum
// Operands and product are two's complement. With radix-2 Booth the digit of
// row i is mr[i-1] - mr[i], and these digits weighted by 2^i add up to the
// signed value of mr, so the tree sum is md * mr. The upper N-1 bits of the
// tree sum carry no information and are left unconnected.
//
// Every gate is built from the GDI basic cell (a pMOS/nMOS pair acting as a
// 2:1 multiplexer). Departures from the original scheme: partial products
// are extended to 16 bits instead of 15, and -MD has a ninth bit, so that the
// product is right for all 65536 operand pairs.
//
// Interface: md, mr (N bits) in; product (2N bits) out. The delay is the sum
// of the half-adder ripple of the negation, the Booth and selection gates,
// six full-adder layers and a ripple across the final row.
module gdi_booth_multiplier #(
  parameter int unsigned N    = gdi_mult_pkg::MULT_N,
  parameter int unsigned PP_W = gdi_mult_pkg::MULT_PP_W
) (
  input  logic [N-1:0]   md,
  input  logic [N-1:0]   mr,
  output logic [2*N-1:0] product
);
  localparam int unsigned SUM_W = gdi_mult_pkg::sum_width(N, PP_W);

  logic [N:0]       neg_md;
  logic [N-1:0]     x, z;
  logic [PP_W-1:0]  pp [N];
  logic [SUM_W-1:0] sum;

  twos_complement #(.N(N)) u_twos (.md(md), .neg_md(neg_md));
  booth_encoder   #(.N(N)) u_booth (.mr(mr), .x(x), .z(z));
  ppg_array #(.N(N), .PP_W(PP_W)) u_ppg (
    .md(md), .neg_md(neg_md), .x(x), .z(z), .pp(pp)
  );
  wallace_tree #(.N(N), .PP_W(PP_W)) u_wallace (.pp(pp), .sum(sum));

  assign product = sum[2*N-1:0];
endmodule
