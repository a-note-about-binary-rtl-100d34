// gf2m_pkg: constants shared by the GF(2^m) matrix multiplier.
//
// GF_M is the largest field degree the hardware is built for; every block
// takes it as the default of its M parameter. M = 16 is the largest field
// the design was evaluated at (m = 2, 4, 8 and 16 were measured); smaller
// fields run on the same hardware by zero padding. MUL_LATENCY is the
// number of clock edges from accepting operands to presenting the product:
// one edge to capture the operand matrices, one to capture the product.
package gf2m_pkg;

  parameter int unsigned GF_M        = 16;
  parameter int unsigned MUL_LATENCY = 2;

endpackage : gf2m_pkg
