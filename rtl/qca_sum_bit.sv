// qca_sum_bit - sum cell of the majority-gate adder for one bit position i.
// It uses the carry out of its own position, inverted, instead of an XOR:
//   s_i = M( ~c_{i+1}, M(x_i, y_i, ~c_{i+1}), c_i )
// where (x_i, y_i) is either the operand pair (a_i, b_i) or the pair
// (p_i, g_i); both give the same result, because M(p_i, g_i, z) equals
// M(a_i, b_i, z) for any z. The cell therefore costs two majority gates and
// one inverter and adds two gates plus the inverter after the carry chain.
// The structure is the published sum-bit circuit; the choice of operand pair
// per bit is left to the instantiating adder. Combinational, no clock.
module qca_sum_bit (
  input  logic x,      // a_i or p_i
  input  logic y,      // b_i or g_i
  input  logic c_in,   // c_i
  input  logic c_out,  // c_{i+1}
  output logic s       // s_i
);
  logic c_out_n, m1;

  always_comb c_out_n = ~c_out;

  qca_maj3 u_m1 (.a(x),       .b(y),  .c(c_out_n), .y(m1));
  qca_maj3 u_m2 (.a(c_out_n), .b(m1), .c(c_in),    .y(s));
endmodule
