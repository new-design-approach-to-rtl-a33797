// qca_carry2 - 2-bit carry module of the majority-gate ripple adder.
// It takes bit positions i and i+1 and the incoming carry c_i and returns
// both c_{i+1} and c_{i+2}, using six majority gates M():
//   p_i     = M(a_i, b_i, 1)            propagate (OR)
//   g_i     = M(a_i, b_i, 0)            generate  (AND)
//   x       = M(a_{i+1}, b_{i+1}, g_i)  = g_{i+1} + p_{i+1}.g_i
//   y       = M(a_{i+1}, b_{i+1}, p_i)  = g_{i+1} + p_{i+1}.p_i
//   c_{i+2} = M(x, y, c_i)              = g_{i+1} + p_{i+1}.g_i + p_{i+1}.p_i.c_i
//   c_{i+1} = M(p_i, g_i, c_i)          = g_i + p_i.c_i
// The point of the structure: x and y depend only on the operands, so the
// carry crosses two bit positions through a single gate (c_i -> c_{i+2}),
// which halves the carry chain of a conventional ripple adder. The gate
// network is taken from the published module; nothing here is clocked.
// p_i and g_i are also brought out, because the sum cell of bit i may use
// them in place of a_i and b_i.
module qca_carry2 (
  input  logic [1:0] a,      // a_{i+1}, a_i
  input  logic [1:0] b,      // b_{i+1}, b_i
  input  logic       c_in,   // c_i
  output logic       c_mid,  // c_{i+1}
  output logic       c_out,  // c_{i+2}
  output logic       p,      // p_i
  output logic       g       // g_i
);
  logic x, y;

  qca_maj3 u_p   (.a(a[0]), .b(b[0]), .c(1'b1), .y(p));
  qca_maj3 u_g   (.a(a[0]), .b(b[0]), .c(1'b0), .y(g));
  qca_maj3 u_x   (.a(a[1]), .b(b[1]), .c(g),    .y(x));
  qca_maj3 u_y   (.a(a[1]), .b(b[1]), .c(p),    .y(y));
  qca_maj3 u_c2  (.a(x),    .b(y),    .c(c_in), .y(c_out));
  qca_maj3 u_c1  (.a(p),    .b(g),    .c(c_in), .y(c_mid));
endmodule
