// tb_gf2m_matrix_multiplier: end-to-end test of the GF(2^m) matrix multiplier
// at its default size (M = 16, no parameter overrides).
//
// Runs products in the fields GF(2^2), GF(2^4), GF(2^8) and GF(2^16), using
// the irreducible polynomials x^2+x+1, x^4+x+1, x^8+x^4+x^3+x+1 and
// x^16+x^5+x^3+x^2+1, plus random polynomials of random degree. The reference
// multiplies the polynomials bit by bit and divides by f (shift-and-XOR long
// division), an independent route to a*b mod f. Both c_poly and the whole
// product matrix are checked; the expected matrix has column j equal to
// x^j c(x) mod f and zeros outside the leading m x m block. Every result must
// appear exactly two edges after its operands.
//
// The test also counts, and requires at least once each: operands on back-
// to-back cycles, idle cycles between operands, products that needed a
// reduction (degree of a*b at least m), a product with an inverse pair giving
// one, a reset in the middle of a stream (results in flight are dropped), and
// each of the four field sizes. A watchdog ends the run.
module tb_gf2m_matrix_multiplier;

  localparam int unsigned M   = gf2m_pkg::GF_M;
  localparam int unsigned LAT = gf2m_pkg::MUL_LATENCY;
  localparam int N_OPS    = 2000;
  localparam int WATCHDOG = 20000;

  typedef logic [M-1:0][M-1:0] mat_t;
  typedef logic [M:0]          fpoly_t;
  typedef logic [M-1:0]        elem_t;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   in_valid;
  fpoly_t f_poly;
  elem_t  a_poly, b_poly, c_poly;
  mat_t   c_mat;
  logic   out_valid;

  int checks = 0, failures = 0;
  int cycle = 0;

  // event counters
  int n_field [4];
  int n_b2b = 0, n_gap = 0, n_reduce = 0, n_inverse = 0, n_reset = 0, n_random_f = 0;

  gf2m_matrix_multiplier dut (
    .clk, .rst_n, .in_valid, .f_poly, .a_poly, .b_poly,
    .out_valid, .c_mat, .c_poly
  );

  always #5 clk = ~clk;

  function automatic int degree(fpoly_t f);
    int d = -1;
    for (int i = 0; i <= int'(M); i++) if (f[i]) d = i;
    return d;
  endfunction

  // Polynomial product (up to degree 2M-2), then remainder modulo f.
  function automatic elem_t ref_mulmod(elem_t a, elem_t b, fpoly_t f);
    logic [2*M-1:0] p = '0;
    logic [2*M-1:0] ff;
    int m = degree(f);
    for (int i = 0; i < int'(M); i++)
      if (a[i]) p ^= (2*M)'(b) << i;
    for (int d = 2*int'(M) - 1; d >= m; d--)
      if (p[d]) begin
        ff = (2*M)'(f) << (d - m);
        p ^= ff;
      end
    return p[M-1:0];
  endfunction

  function automatic logic needs_reduction(elem_t a, elem_t b, int m);
    int da = -1, db = -1;
    for (int i = 0; i < int'(M); i++) begin
      if (a[i]) da = i;
      if (b[i]) db = i;
    end
    return (da >= 0) && (db >= 0) && (da + db >= m);
  endfunction

  function automatic mat_t ref_matrix(elem_t c, fpoly_t f);
    mat_t  r = '0;
    elem_t x = '0;
    int    m = degree(f);
    x[1 % M] = (m > 1);
    for (int j = 0; j < m; j++) begin
      elem_t col = c;
      for (int t = 0; t < j; t++) col = ref_mulmod(col, x, f);
      for (int i = 0; i < m; i++) r[i][j] = col[i];
    end
    return r;
  endfunction

  // a^(2^m - 2) is the inverse of a nonzero a in GF(2^m).
  function automatic elem_t ref_inverse(elem_t a, fpoly_t f);
    elem_t r = 1, s = a;
    int    m = degree(f);
    for (int i = 1; i < m; i++) begin
      s = ref_mulmod(s, s, f);
      r = ref_mulmod(r, s, f);
    end
    return r;
  endfunction

  fpoly_t fields [4] = '{fpoly_t'('h7), fpoly_t'('h13), fpoly_t'('h11b), fpoly_t'('h1002d)};

  elem_t  expc_q[$];
  mat_t   expm_q[$];
  int     due_q[$];

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int  sent = 0;
    automatic logic prev_valid = 1'b0;
    rst_n = 1'b0; in_valid = 1'b0; f_poly = fields[1]; a_poly = '0; b_poly = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < N_OPS || due_q.size() != 0) begin
      int    m, fsel;
      elem_t mask;
      @(negedge clk);
      cycle++;
      // results of the last edge
      if (out_valid) begin
        checks++;
        if (due_q.size() == 0) begin
          failures++; $display("unexpected out_valid at cycle %0d", cycle);
        end else begin
          elem_t ec;
          mat_t  em;
          int    d;
          ec = expc_q.pop_front();
          em = expm_q.pop_front();
          d  = due_q.pop_front();
          if (d != cycle) begin
            failures++; $display("latency: due %0d got %0d", d, cycle);
          end
          checks += 2;
          if (c_poly !== ec) begin
            failures++; $display("c_poly %h expected %h (cycle %0d)", c_poly, ec, cycle);
          end
          if (c_mat !== em) begin
            failures++; $display("c_mat mismatch (cycle %0d)", cycle);
          end
        end
      end else if (due_q.size() != 0 && due_q[0] <= cycle) begin
        checks++; failures++; $display("missing result due %0d", due_q[0]);
        void'(expc_q.pop_front()); void'(expm_q.pop_front()); void'(due_q.pop_front());
      end

      // a reset in mid-stream: anything in flight is dropped
      if (sent == N_OPS / 2 && rst_n) begin
        rst_n = 1'b0; in_valid = 1'b0;
        expc_q.delete(); expm_q.delete(); due_q.delete();
        n_reset++;
        prev_valid = 1'b0;
        continue;
      end
      if (!rst_n) begin
        rst_n = 1'b1;
        checks++;
        if (out_valid) begin
          failures++; $display("out_valid set during reset");
        end
      end

      // next operands
      in_valid = (sent < N_OPS) && ($urandom_range(0, 2) != 0);
      if (in_valid) begin
        fsel = sent % 5;
        if (fsel < 4) begin
          f_poly = fields[fsel];
          n_field[fsel]++;
        end else begin
          m = $urandom_range(1, M);
          f_poly = '0;
          f_poly[m] = 1'b1;
          for (int i = 0; i < m; i++) f_poly[i] = $urandom_range(0, 1) == 1;
          n_random_f++;
        end
        m = degree(f_poly);
        mask = '0;
        for (int i = 0; i < m; i++) mask[i] = 1'b1;
        a_poly = elem_t'($urandom()) & mask;
        b_poly = elem_t'($urandom()) & mask;
        if (fsel < 4 && a_poly != 0 && (sent % 7) == 0) begin
          b_poly = ref_inverse(a_poly, f_poly);
          n_inverse++;
          if (ref_mulmod(a_poly, b_poly, f_poly) != 1) begin
            failures++; $display("reference inverse wrong");
          end
        end
        if (needs_reduction(a_poly, b_poly, m)) n_reduce++;
        if (prev_valid) n_b2b++;
        expc_q.push_back(ref_mulmod(a_poly, b_poly, f_poly));
        expm_q.push_back(ref_matrix(ref_mulmod(a_poly, b_poly, f_poly), f_poly));
        due_q.push_back(cycle + int'(LAT));
        sent++;
      end else begin
        if (sent < N_OPS) n_gap++;
        a_poly = elem_t'($urandom());
        b_poly = elem_t'($urandom());
      end
      prev_valid = in_valid;
    end

    $display("fields m=2:%0d m=4:%0d m=8:%0d m=16:%0d random:%0d",
             n_field[0], n_field[1], n_field[2], n_field[3], n_random_f);
    $display("back-to-back:%0d gaps:%0d reductions:%0d inverses:%0d resets:%0d",
             n_b2b, n_gap, n_reduce, n_inverse, n_reset);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_field[i] == 0) failures++;
    end
    checks += 6;
    if (n_b2b == 0)      failures++;
    if (n_gap == 0)      failures++;
    if (n_reduce == 0)   failures++;
    if (n_inverse == 0)  failures++;
    if (n_reset == 0)    failures++;
    if (n_random_f == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_gf2m_matrix_multiplier
