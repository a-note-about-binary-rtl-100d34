// gf2_matrix_mul: fully parallel product of two M x M bit matrices over GF(2).
//
// Each entry of C = A*B is the inner product of a row of A and a column of B,
// where multiplication in GF(2) is AND and addition is XOR:
//   C[i][j] = XOR over k of (A[i][k] AND B[k][j]).
// All M*M entries are formed at once, with M^3 AND gates and M*M XOR trees of
// M inputs, so there is no iteration and no dependence between entries. This
// is the parallel ("par") matrix product of the design; the operands are
// matrices a(A), b(A) over the companion matrix of the field polynomial, so
// the product needs no separate reduction modulo f(x).
//
// Interface: matrices are packed as mat[row][col]. in_valid marks operands;
// there is no back-pressure, a new pair may be given every cycle.
// Timing: two cycles, matching the two-cycle figure of the design. Edge 1
// captures the operand matrices, edge 2 captures the product, so out_valid
// and c_mat appear two rising edges after in_valid and stay until the next
// edge. Throughput is one product per cycle. Only the valid flags are reset
// (synchronous, active low); the data registers are loaded with the flags.
// The split into an operand register and a product register is this design's
// reading of the two cycles; the entry equation follows the design exactly.
// Two assertions state the valid rule against gf2m_pkg::MUL_LATENCY.
module gf2_matrix_mul #(
  parameter int unsigned M = gf2m_pkg::GF_M
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [M-1:0][M-1:0]   a_mat,
  input  logic [M-1:0][M-1:0]   b_mat,
  output logic                  out_valid,
  output logic [M-1:0][M-1:0]   c_mat
);

  logic                v_q;
  logic [M-1:0][M-1:0] a_q;
  logic [M-1:0][M-1:0] bt_q;   // B transposed: bt_q[j] is column j of B
  logic [M-1:0][M-1:0] prod;

  // Cycle 1: capture A and the transpose of B.
  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
    if (in_valid) begin
      a_q <= a_mat;
      for (int j = 0; j < int'(M); j++)
        for (int k = 0; k < int'(M); k++)
          bt_q[j][k] <= b_mat[k][j];
    end
  end

  // Every entry at once: AND of a row with a column, XOR-reduced.
  always_comb begin
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++)
        prod[i][j] = ^(a_q[i] & bt_q[j]);
  end

  // Cycle 2: capture the product.
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_q;
    if (v_q) c_mat <= prod;
  end

  // Handshake rule: every accepted pair yields exactly one result,
  // MUL_LATENCY edges later, and no result appears without one.
  localparam int unsigned LAT = gf2m_pkg::MUL_LATENCY;

  a_result_follows : assert property (
    @(posedge clk) disable iff (!rst_n) in_valid |-> ##LAT out_valid);
  a_no_spurious : assert property (
    @(posedge clk) disable iff (!rst_n) out_valid |-> $past(in_valid, LAT));

endmodule : gf2_matrix_mul
