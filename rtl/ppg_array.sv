// Complete partial products generator: N pp_row instances, row i driven by
// the Booth controls x[i], z[i] of multiplier bit i and sharing MD and -MD.
// pp[i] is the sign-extended value of row i; its weight is 2^i.
//
// Interface: md (N), neg_md (N+1), x, z (N each) in; pp (N rows of PP_W) out.
// Combinational.
module ppg_array #(
  parameter int unsigned N    = gdi_mult_pkg::MULT_N,
  parameter int unsigned PP_W = gdi_mult_pkg::MULT_PP_W
) (
  input  logic [N-1:0]    md,
  input  logic [N:0]      neg_md,
  input  logic [N-1:0]    x,
  input  logic [N-1:0]    z,
  output logic [PP_W-1:0] pp [N]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    pp_row #(.N(N), .PP_W(PP_W)) u_row (
      .md(md), .neg_md(neg_md), .x(x[i]), .z(z[i]), .pp(pp[i])
    );
  end
endmodule
