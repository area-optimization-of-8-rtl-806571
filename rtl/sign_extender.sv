// Sign extender / buffer for one partial-product row.
//
// The IN_W bits of d pass straight to q[IN_W-1:0]; the sign bit d[IN_W-1] is
// buffered by a pair of GDI inverters, which restore the signal swing and
// drive the OUT_W-IN_W upper bits of q. The buffering follows the role given
// to inverters in GDI gates; one buffer per row is this design's choice.
//
// Interface: d (IN_W bits) in, q (OUT_W bits, OUT_W >= IN_W) out.
// Combinational.
module sign_extender #(
  parameter int unsigned IN_W  = gdi_mult_pkg::MULT_N + 1,
  parameter int unsigned OUT_W = gdi_mult_pkg::MULT_PP_W
) (
  input  logic [IN_W-1:0]  d,
  output logic [OUT_W-1:0] q
);
  logic sign_n, sign_buf;

  gdi_inv u_inv0 (.a(d[IN_W-1]), .y(sign_n));
  gdi_inv u_inv1 (.a(sign_n),    .y(sign_buf));

  assign q[IN_W-1:0] = d;
  if (OUT_W > IN_W) begin : g_ext
    assign q[OUT_W-1:IN_W] = {(OUT_W-IN_W){sign_buf}};
  end
endmodule
