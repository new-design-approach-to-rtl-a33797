// qca_carry2_lsb - simplified 2-bit carry module for the least significant
// pair of bits when the adder has no carry-in (c_0 = 0).
// With c_0 = 0 the propagate signal p_0 is never needed:
//   g_0 = M(a_0, b_0, 0)       = c_1
//   c_2 = M(a_1, b_1, g_0)     = g_1 + p_1.g_0
// Two majority gates in series, so this module is where a carry generated at
// bit 0 enters the chain in the worst case. The simplification itself is the
// published one; the gate wiring follows the right-hand part of the n-bit
// adder drawing. Combinational, no clock.
module qca_carry2_lsb (
  input  logic [1:0] a,      // a_1, a_0
  input  logic [1:0] b,      // b_1, b_0
  output logic       c_mid,  // c_1 (= g_0)
  output logic       c_out   // c_2
);
  logic g0;

  qca_maj3 u_g  (.a(a[0]), .b(b[0]), .c(1'b0), .y(g0));
  qca_maj3 u_c2 (.a(a[1]), .b(b[1]), .c(g0),   .y(c_out));
  assign c_mid = g0;
endmodule
