// companion_encoder: maps a field element a(x) to its matrix a(A).
//
// A is the companion matrix of the field polynomial f(x) of degree m: ones on
// the sub-diagonal and the low coefficients of f in the last column, so that
// A times a coefficient vector v is x*v(x) mod f(x). Since a(A) commutes with
// A and a(A) e0 = a, column j of a(A) is A^j a, that is x^j a(x) mod f(x).
// The block builds the columns as a chain of M-1 "multiply by x" stages:
// shift left one place and, if the coefficient of x^(m-1) was one, XOR in the
// low coefficients of f. Representing elements as polynomials in A follows
// the design; building a(A) column by column this way is this design's own
// choice, as is the single-cycle combinational form.
//
// Interface: f_poly holds f with its leading one, bit i = coefficient of x^i;
// its highest set bit gives the degree m (1..M). Bits of a_poly at or above
// m are ignored. a_mat is packed a_mat[row][col]; rows and columns at or
// above m are zero, so a field of degree m < M sits in the leading m x m
// block and products of such matrices stay there.
// Timing: purely combinational, a chain of M-1 shift/XOR stages.
module companion_encoder #(
  parameter int unsigned M = gf2m_pkg::GF_M
) (
  input  logic [M:0]            f_poly,
  input  logic [M-1:0]          a_poly,
  output logic [M-1:0][M-1:0]   a_mat
);

  logic [M-1:0]          live;   // live[i]: i < deg f
  logic [M-1:0]          top;    // one-hot at bit deg f - 1
  logic [M-1:0]          f_low;  // coefficients of f below its leading one
  logic [M-1:0][M-1:0]   col;    // col[j] = x^j a(x) mod f(x)

  always_comb begin
    for (int i = 0; i < int'(M); i++)
      live[i] = |(f_poly >> (i + 1));
    for (int i = 0; i < int'(M); i++)
      top[i] = live[i] & ((i == int'(M) - 1) ? 1'b1 : !live[i+1]);
    f_low = f_poly[M-1:0] & live;
  end

  // Column 0 is a itself; each later column is the previous one times x.
  assign col[0] = a_poly & live;
  for (genvar j = 1; j < M; j++) begin : g_xtime
    assign col[j] = ((col[j-1] << 1) & live)
                  ^ ((|(col[j-1] & top)) ? f_low : '0);
  end

  always_comb begin
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++)
        a_mat[i][j] = col[j][i] & live[j];
  end

endmodule : companion_encoder
