// qca_adder - N-bit binary adder built only from 3-input majority gates (MG)
// and inverters, in the style of quantum-dot cellular automata logic.
//
// How it works: the operands are split into N/2 bit pairs. Each pair has a
// 2-bit carry module (qca_carry2) that produces c_{2k+1} and c_{2k+2} from
// c_{2k}; the carry chain c_0 -> c_2 -> c_4 -> ... -> c_N passes through one
// majority gate per pair, i.e. one gate per two bits, instead of the two
// gates per two bits of a plain majority-gate ripple adder. Every bit then has
// a sum cell (qca_sum_bit), s_i = M(~c_{i+1}, M(x_i, y_i, ~c_{i+1}), c_i).
// Even bits feed the sum cell with (p_i, g_i) from their carry module and odd
// bits with (a_i, b_i), as in the published n-bit drawing.
//
// Worst case path (a carry generated at bit 0 and propagated to bit N-1):
// without carry-in, N/2 + 3 majority gates and one inverter.
//
// Parameters:
//   N        operand width, even, >= 2. Default 128 (the evaluated size).
//   HAS_CIN  1: the adder has a carry-in port, the way the 128-bit adder was
//            simulated (carry-in present, set to 1). 0: c_0 is tied to 0, the
//            cin port is not read, and the least significant pair uses the
//            simplified module qca_carry2_lsb without p_0, as the published
//            architecture describes. Default 1 is this design's choice.
// Ports: a, b (N bits), cin, sum (N bits), cout (= c_N). Purely
// combinational: no clock, no reset, result valid one propagation delay after
// the inputs change. The latency in QCA clock cycles of a physical QCA layout
// is not modelled.
module qca_adder #(
  parameter int unsigned N       = 128,
  parameter bit          HAS_CIN = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned PAIRS = N / 2;

  if ((N % 2) != 0 || N < 2) begin : g_bad_width
    $error("qca_adder: N must be even and at least 2");
  end

  logic [N:0]     c;     // c[i] is the carry into bit i, c[N] the carry-out
  logic [N-1:0]   sx, sy; // operand pair fed to each sum cell

  for (genvar k = 0; k < PAIRS; k++) begin : g_pair
    if (k == 0 && !HAS_CIN) begin : g_lsb
      // c_0 = 0: simplified first module, sum cell of bit 0 takes a_0, b_0.
      qca_carry2_lsb u_carry (
        .a    (a[1:0]),
        .b    (b[1:0]),
        .c_mid(c[1]),
        .c_out(c[2])
      );
      assign sx[0] = a[0];
      assign sy[0] = b[0];
    end else begin : g_full
      qca_carry2 u_carry (
        .a    (a[2*k+1 : 2*k]),
        .b    (b[2*k+1 : 2*k]),
        .c_in (c[2*k]),
        .c_mid(c[2*k+1]),
        .c_out(c[2*k+2]),
        .p    (sx[2*k]),
        .g    (sy[2*k])
      );
    end
    assign sx[2*k+1] = a[2*k+1];
    assign sy[2*k+1] = b[2*k+1];
  end

  for (genvar i = 0; i < N; i++) begin : g_sum
    qca_sum_bit u_sum (
      .x    (sx[i]),
      .y    (sy[i]),
      .c_in (c[i]),
      .c_out(c[i+1]),
      .s    (sum[i])
    );
  end

  if (HAS_CIN) begin : g_cin
    assign c[0] = cin;
  end else begin : g_no_cin
    assign c[0] = 1'b0;
  end

  assign cout = c[N];
endmodule
