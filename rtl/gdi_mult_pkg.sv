// Shared constants of the GDI Booth multiplier.
//
// MULT_N is the operand width of the multiplier (8 bits, the size the design
// is specified for). MULT_PP_W is the width each Booth partial product is
// sign-extended to before the Wallace tree adds them. The original scheme
// extends to 15 bits; 16 is used here because the least significant partial
// product must reach bit 15 of the product for that bit to be right when the
// partial product is negative. The helper function sum_width gives the width
// of the full Wallace-tree sum.
package gdi_mult_pkg;
  localparam int unsigned MULT_N    = 8;
  localparam int unsigned MULT_PP_W = 16;

  function automatic int unsigned sum_width(int unsigned n, int unsigned pp_w);
    return pp_w + n - 1;
  endfunction
endpackage
