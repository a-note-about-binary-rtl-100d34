// gf2m_matrix_multiplier: GF(2^m) multiplier that works on the matrix form of
// the field elements.
//
// Elements of GF(2^m) are given as polynomial-basis bit vectors together with
// the field polynomial f(x). Each operand is turned into its matrix over the
// companion matrix A of f (companion_encoder), and the two matrices are
// multiplied over GF(2) by a fully parallel AND/XOR array (gf2_matrix_mul).
// Because A is a root of f, the product matrix is itself an element, c(A)
// with c = a*b mod f, and no reduction step is needed. Its first column is
// the coefficient vector of c(x), brought out as c_poly. Using matrices as
// the element form and the parallel matrix product follow the design; the
// polynomial-to-matrix front end and taking c(x) from the first column are
// this design's choices for connecting it to polynomial-basis data.
//
// Interface: f_poly is f with its leading one (bit i = coefficient of x^i);
// its degree m may be anything from 1 to M, so one build serves every field
// size up to M. a_poly and b_poly must have degree below m (higher bits are
// ignored). c_mat is packed c_mat[row][col], zero outside the leading m x m
// block. No back-pressure: a new operand pair is accepted every cycle.
// Timing: 2 cycles. The encoders are combinational in front of the operand
// register, so out_valid, c_mat and c_poly follow in_valid by two rising
// edges; one result per cycle. Synchronous active-low reset clears the valid
// pipeline only.
module gf2m_matrix_multiplier #(
  parameter int unsigned M = gf2m_pkg::GF_M
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [M:0]            f_poly,
  input  logic [M-1:0]          a_poly,
  input  logic [M-1:0]          b_poly,
  output logic                  out_valid,
  output logic [M-1:0][M-1:0]   c_mat,
  output logic [M-1:0]          c_poly
);

  logic [M-1:0][M-1:0] a_mat, b_mat;

  companion_encoder #(.M(M)) u_enc_a (
    .f_poly (f_poly),
    .a_poly (a_poly),
    .a_mat  (a_mat)
  );

  companion_encoder #(.M(M)) u_enc_b (
    .f_poly (f_poly),
    .a_poly (b_poly),
    .a_mat  (b_mat)
  );

  gf2_matrix_mul #(.M(M)) u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a_mat     (a_mat),
    .b_mat     (b_mat),
    .out_valid (out_valid),
    .c_mat     (c_mat)
  );

  // c(A) e0 = c: the first column holds the polynomial-basis result.
  always_comb
    for (int i = 0; i < int'(M); i++)
      c_poly[i] = c_mat[i][0];

endmodule : gf2m_matrix_multiplier
