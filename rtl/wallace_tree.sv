// Wallace tree adder for the N sign-extended partial products.
//
// Row i (PP_W bits) is weighted by 2^i, so column c of the W = PP_W+N-1 bit
// sum collects one bit from every row i with i <= c < i+PP_W. The tree works
// in two stages:
//  1. Reduction layers. In each layer, every full group of three bits in a
//     column enters a full adder (3:2 compression): its sum stays in the
//     column, its carry moves to column c+1 of the next layer. Bits left over
//     (one or two) pass to the next layer unchanged. Layers are added until no
//     column holds more than two bits (six layers for N=8 and PP_W=16).
//  2. Final row. A ripple row adds the remaining two bits of each column and
//     the carry from the column below, with a half adder where two bits meet
//     and a full adder where three meet. Column 0 only ever holds one bit; it
//     goes to the output through a buffer of two GDI inverters.
// Column heights are computed once at elaboration by constant functions, so
// the structure follows N and PP_W (PP_W must be at least N). At the default
// sizes the tree holds 104 full adders, 8 half adders and one buffer.
// Carries out of the top column are dropped (the sum is modulo 2^W); only the
// low 2N bits are a product, so this is harmless, and the carry output of
// the top column's adder is left unconnected. The placement of the adders
// is this design's own; the use of full and half adders, 3:2 compression and
// a column-0 buffer follows the original scheme.
//
// Interface: pp (N rows of PP_W bits) in; sum (W bits) out. Combinational.
module wallace_tree #(
  parameter int unsigned N    = gdi_mult_pkg::MULT_N,
  parameter int unsigned PP_W = gdi_mult_pkg::MULT_PP_W
) (
  input  logic [PP_W-1:0] pp [N],
  output logic [PP_W+N-2:0] sum
);
  localparam int W = int'(PP_W + N - 1);

  localparam int LMAX = 12;   // upper bound on reduction layers (N up to 190)
  localparam int HB   = 8;    // bits per stored column height

  // Height of every column after 0..LMAX reduction layers, computed once and
  // packed HB bits per entry: entry (l, c) is at bit (l*W + c)*HB.
  function automatic logic [HB*W*(LMAX+1)-1:0] heights();
    logic [HB*W*(LMAX+1)-1:0] r = '0;
    int h  [W];
    int nh [W];
    for (int k = 0; k < W; k++) begin
      h[k] = 0;
      for (int i = 0; i < int'(N); i++)
        if (i <= k && k < i + int'(PP_W)) h[k]++;
    end
    for (int l = 0; l <= LMAX; l++) begin
      for (int k = 0; k < W; k++) r[(l*W + k)*HB +: HB] = HB'(h[k]);
      for (int k = 0; k < W; k++)
        nh[k] = h[k] / 3 + h[k] % 3 + ((k > 0) ? h[k-1] / 3 : 0);
      h = nh;
    end
    return r;
  endfunction

  localparam logic [HB*W*(LMAX+1)-1:0] HT = heights();

  // Height of column c at the input of layer l.
  function automatic int col_h(int l, int c);
    return int'(HT[(l*W + c)*HB +: HB]);
  endfunction

  // Number of layers until no column holds more than two bits.
  function automatic int num_layers();
    for (int l = 0; l <= LMAX; l++) begin
      int m = 0;
      for (int k = 0; k < W; k++) if (col_h(l, k) > m) m = col_h(l, k);
      if (m <= 2) return l;
    end
    return LMAX;
  endfunction

  localparam int NL   = num_layers();
  localparam int MAXH = col_h(0, int'(N) - 1);   // the tallest column of the input

  // Bit c: column c of the final row receives a carry from column c-1.
  function automatic logic [W-1:0] carry_in_map();
    logic [W-1:0] m = '0;
    for (int k = 1; k < W; k++)
      m[k] = (col_h(NL, k-1) + int'(m[k-1])) >= 2;
    return m;
  endfunction

  localparam logic [W-1:0] CIN_MAP = carry_in_map();

  // g_lv[l].b[c][k]: bit k of column c at the input of layer l.
  // g_cv[l].cy[c][k]: carry out of full adder k of column c in layer l.
  for (genvar l = 0; l <= NL; l++) begin : g_lv
    logic [MAXH-1:0] b [W];
  end
  for (genvar l = 0; l < NL; l++) begin : g_cv
    logic [MAXH-1:0] cy [W];
  end

  // Layer 0: partial-product bits, ordered by row.
  for (genvar c = 0; c < W; c++) begin : g_in_col
    for (genvar i = 0; i < int'(N); i++) begin : g_in_row
      if (i <= c && c < i + int'(PP_W)) begin : g_bit
        // index of row i in column c = number of rows below i that reach c
        localparam int K = i - ((c - int'(PP_W) + 1 > 0) ? c - int'(PP_W) + 1 : 0);
        assign g_lv[0].b[c][K] = pp[i][c-i];
      end
    end
    for (genvar k = col_h(0, c); k < MAXH; k++) begin : g_pad
      assign g_lv[0].b[c][k] = 1'b0;
    end
  end

  // Reduction layers.
  for (genvar l = 0; l < NL; l++) begin : g_layer
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H  = col_h(l, c);
      localparam int NF = H / 3;
      localparam int R  = H % 3;
      localparam int NC = (c > 0) ? col_h(l, c - 1) / 3 : 0;
      for (genvar k = 0; k < NF; k++) begin : g_fa
        full_adder u_fa (
          .a (g_lv[l].b[c][3*k]), .b(g_lv[l].b[c][3*k+1]), .ci(g_lv[l].b[c][3*k+2]),
          .s (g_lv[l+1].b[c][k]), .co(g_cv[l].cy[c][k])
        );
      end
      for (genvar k = NF; k < MAXH; k++) begin : g_no_fa
        assign g_cv[l].cy[c][k] = 1'b0;
      end
      for (genvar r = 0; r < R; r++) begin : g_pass
        assign g_lv[l+1].b[c][NF+r] = g_lv[l].b[c][3*NF+r];
      end
      for (genvar k = 0; k < NC; k++) begin : g_cin
        assign g_lv[l+1].b[c][NF+R+k] = g_cv[l].cy[c-1][k];
      end
      for (genvar k = NF + R + NC; k < MAXH; k++) begin : g_pad
        assign g_lv[l+1].b[c][k] = 1'b0;
      end
    end
  end

  // Final ripple row: g_final[c].co is the carry from column c into c+1.
  for (genvar c = 0; c < W; c++) begin : g_final
    localparam int  H   = col_h(NL, c);
    localparam bit  CIN = CIN_MAP[c];
    localparam int  NIN = H + int'(CIN);
    logic co;
    if (NIN == 3) begin : g_fa
      full_adder u_fa (
        .a(g_lv[NL].b[c][0]), .b(g_lv[NL].b[c][1]), .ci(g_final[c-1].co),
        .s(sum[c]), .co(co)
      );
    end else if (NIN == 2 && CIN) begin : g_ha_cin
      half_adder u_ha (.a(g_lv[NL].b[c][0]), .b(g_final[c-1].co), .s(sum[c]), .c(co));
    end else if (NIN == 2) begin : g_ha
      half_adder u_ha (.a(g_lv[NL].b[c][0]), .b(g_lv[NL].b[c][1]), .s(sum[c]), .c(co));
    end else if (NIN == 1 && CIN) begin : g_buf_cin
      logic buf_n;
      gdi_inv u_inv0 (.a(g_final[c-1].co), .y(buf_n));
      gdi_inv u_inv1 (.a(buf_n), .y(sum[c]));
      assign co = 1'b0;
    end else if (NIN == 1) begin : g_buf
      logic buf_n;
      gdi_inv u_inv0 (.a(g_lv[NL].b[c][0]), .y(buf_n));
      gdi_inv u_inv1 (.a(buf_n), .y(sum[c]));
      assign co = 1'b0;
    end else begin : g_empty
      assign sum[c] = 1'b0;
      assign co     = 1'b0;
    end
  end
endmodule
