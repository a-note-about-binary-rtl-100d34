// tb_gf2_matrix_mul: self-checking test of the parallel GF(2) matrix product.
//
// Drives random M x M bit matrices (plus identity, zero, all-ones and a small
// hand-worked example whose product is given as a constant)
// with random gaps in in_valid, and compares every product with a reference
// computed here entry by entry as a sum mod 2 of integer products. Each
// result must arrive exactly two clock edges after its operands; a missing,
// early, late or extra out_valid counts as a failure. Inputs are driven and
// outputs sampled on the falling edge. A watchdog ends the run.
module tb_gf2_matrix_mul;

  localparam int unsigned M       = gf2m_pkg::GF_M;
  localparam int unsigned LAT     = gf2m_pkg::MUL_LATENCY;
  localparam int          N_OPS   = 400;
  localparam int          WATCHDOG = 5000;

  typedef logic [M-1:0][M-1:0] mat_t;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  mat_t a_mat, b_mat, c_mat;
  logic out_valid;

  int checks = 0, failures = 0;
  int cycle = 0;

  gf2_matrix_mul #(.M(M)) dut (
    .clk, .rst_n, .in_valid, .a_mat, .b_mat, .out_valid, .c_mat
  );

  always #5 clk = ~clk;

  // Reference: count the ones among A[i][k]*B[k][j] and keep the parity.
  function automatic mat_t ref_mul(mat_t a, mat_t b);
    mat_t c;
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++) begin
        int s = 0;
        for (int k = 0; k < int'(M); k++) s += int'(a[i][k]) * int'(b[k][j]);
        c[i][j] = (s % 2) == 1;
      end
    return c;
  endfunction

  function automatic mat_t rand_mat();
    mat_t r;
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++) r[i][j] = $urandom_range(0, 1) == 1;
    return r;
  endfunction

  function automatic mat_t ident();
    mat_t r = '0;
    for (int i = 0; i < int'(M); i++) r[i][i] = 1'b1;
    return r;
  endfunction

  // The worked 4 x 4 example of the method: A = [1 0; 1 1], B = [0 1; 1 0]
  // in the leading corner, zeros elsewhere. By hand, A*B = [0 1; 1 1].
  function automatic mat_t ex_a();
    mat_t r = '0;
    r[0][0] = 1'b1; r[1][0] = 1'b1; r[1][1] = 1'b1;
    return r;
  endfunction
  function automatic mat_t ex_b();
    mat_t r = '0;
    r[1][0] = 1'b1; r[0][1] = 1'b1;
    return r;
  endfunction
  function automatic mat_t ex_c();
    mat_t r = '0;
    r[0][1] = 1'b1; r[1][0] = 1'b1; r[1][1] = 1'b1;
    return r;
  endfunction

  mat_t exp_q[$];
  int   due_q[$];

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int sent = 0;
    rst_n = 1'b0; in_valid = 1'b0; a_mat = '0; b_mat = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < N_OPS || exp_q.size() != 0) begin
      @(negedge clk);
      cycle++;
      // check what the last edge produced
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected out_valid at cycle %0d", cycle);
        end else begin
          mat_t e;
          int   d;
          e = exp_q.pop_front();
          d = due_q.pop_front();
          if (d != cycle) begin
            failures++; $display("latency: due %0d got %0d", d, cycle);
          end
          checks++;
          if (c_mat !== e) begin
            failures++; $display("product mismatch at cycle %0d", cycle);
          end
        end
      end else if (due_q.size() != 0 && due_q[0] <= cycle) begin
        checks++; failures++; $display("missing result due %0d", due_q[0]);
        void'(exp_q.pop_front()); void'(due_q.pop_front());
      end
      // drive the next operands
      in_valid = (sent < N_OPS) && ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        case (sent)
          0: begin a_mat = ident(); b_mat = rand_mat(); end
          1: begin a_mat = rand_mat(); b_mat = ident(); end
          2: begin a_mat = '0; b_mat = rand_mat(); end
          3: begin a_mat = '1; b_mat = '1; end
          4: begin a_mat = ex_a(); b_mat = ex_b(); end
          default: begin a_mat = rand_mat(); b_mat = rand_mat(); end
        endcase
        exp_q.push_back(sent == 4 ? ex_c() : ref_mul(a_mat, b_mat));
        due_q.push_back(cycle + int'(LAT));
        sent++;
      end else begin
        a_mat = rand_mat(); b_mat = rand_mat();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_gf2_matrix_mul
