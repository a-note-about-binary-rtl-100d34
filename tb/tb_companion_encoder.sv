// tb_companion_encoder: self-checking test of the polynomial-to-matrix map.
//
// For field polynomials of degree 2, 4, 8 and 16 and of random degree, and
// for random elements a(x), the reference builds the companion matrix A of f
// from its definition (ones below the diagonal, low coefficients of f in the
// last column), forms a(A) = sum of a_i A^i by explicit matrix powers, and
// compares it with the block's output. Entries outside the leading m x m
// block must be zero. The block is combinational; each case is settled for
// one time step before it is checked.
module tb_companion_encoder;

  localparam int unsigned M = gf2m_pkg::GF_M;
  localparam int N_CASES = 600;

  typedef logic [M-1:0][M-1:0] mat_t;

  logic [M:0]   f_poly;
  logic [M-1:0] a_poly;
  mat_t         a_mat;

  int checks = 0, failures = 0;

  companion_encoder #(.M(M)) dut (.f_poly, .a_poly, .a_mat);

  function automatic mat_t mmul(mat_t x, mat_t y, int m);
    mat_t z = '0;
    for (int i = 0; i < m; i++)
      for (int j = 0; j < m; j++)
        for (int k = 0; k < m; k++) z[i][j] ^= x[i][k] & y[k][j];
    return z;
  endfunction

  function automatic mat_t ref_enc(logic [M:0] f, logic [M-1:0] a, int m);
    mat_t cm = '0, p = '0, acc = '0;
    for (int i = 1; i < m; i++) cm[i][i-1] = 1'b1;
    for (int i = 0; i < m; i++) cm[i][m-1] = f[i];
    for (int i = 0; i < m; i++) p[i][i] = 1'b1;
    for (int d = 0; d < m; d++) begin
      if (a[d]) acc ^= p;
      p = mmul(p, cm, m);
    end
    return acc;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int degs [4] = '{2, 4, 8, 16};
    for (int n = 0; n < N_CASES; n++) begin
      int m;
      logic [M-1:0] amask;
      m = (n < 400) ? degs[n % 4] : int'($urandom_range(1, M));
      f_poly = '0;
      f_poly[m] = 1'b1;
      for (int i = 0; i < m; i++) f_poly[i] = $urandom_range(0, 1) == 1;
      if (n % 4 == 1 && m == 4) f_poly = 'h13;     // x^4 + x + 1
      amask = '0;
      for (int i = 0; i < m; i++) amask[i] = 1'b1;
      a_poly = M'($urandom()) & amask;
      if (n < 4) a_poly = 1;                       // the identity element
      else if (n < 8) a_poly = 2 & amask;          // x itself: a(A) = A
      #1;
      checks++;
      if (a_mat !== ref_enc(f_poly, a_poly, m)) begin
        failures++;
        $display("mismatch m=%0d f=%h a=%h", m, f_poly, a_poly);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_companion_encoder
