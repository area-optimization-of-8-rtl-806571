// Partial product generator for one bit of the multiplier.
//
// From the Booth controls x (negative) and z (non-zero) of its row, the
// generator forms the row value
//   z = 0        -> 0
//   z = 1, x = 0 -> +MD
//   z = 1, x = 1 -> -MD
// bit by bit as (MD_j AND x' AND z) OR (-MD_j AND x AND z), with one
// inverter for x', two three-input ANDs and one OR per bit. The row has N+1
// such slices: the low N follow the original 8-bit row, the extra top slice
// selects the sign bit (md[N-1] for +MD, neg_md[N] for -MD) so that -MD is
// right for md = -128. The sign extender widens the row to PP_W bits.
// The row is not shifted here; its weight 2^i is applied by the adder tree.
//
// Interface: md (N), neg_md (N+1), x, z in; pp (PP_W) out. Combinational.
module pp_row #(
  parameter int unsigned N    = gdi_mult_pkg::MULT_N,
  parameter int unsigned PP_W = gdi_mult_pkg::MULT_PP_W
) (
  input  logic [N-1:0]    md,
  input  logic [N:0]      neg_md,
  input  logic            x,
  input  logic            z,
  output logic [PP_W-1:0] pp
);
  logic         x_n;
  logic [N:0]   md_ext;
  logic [N:0]   sel_pos, sel_neg, row;

  assign md_ext = {md[N-1], md};

  gdi_inv u_inv_x (.a(x), .y(x_n));

  for (genvar j = 0; j <= N; j++) begin : g_bit
    gdi_and3 u_and_pos (.a(md_ext[j]), .b(x_n), .c(z), .y(sel_pos[j]));
    gdi_and3 u_and_neg (.a(neg_md[j]), .b(x),   .c(z), .y(sel_neg[j]));
    gdi_or2  u_or      (.a(sel_pos[j]), .b(sel_neg[j]), .y(row[j]));
  end

  sign_extender #(.IN_W(N+1), .OUT_W(PP_W)) u_sext (.d(row), .q(pp));
endmodule
