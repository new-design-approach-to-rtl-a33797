// tb_qca_sum_bit - checks the sum cell of one bit position. For every
// (a_i, b_i, c_i) the carry c_{i+1} is computed in the testbench from the
// full-adder equation, the cell is fed once with (a_i, b_i) and once with
// (p_i, g_i) = (a_i | b_i, a_i & b_i), and the output must equal
// a_i ^ b_i ^ c_i both times.
module tb_qca_sum_bit;
  logic x, y, c_in, c_out, s;
  int checks = 0, failures = 0;

  qca_sum_bit dut (.x(x), .y(y), .c_in(c_in), .c_out(c_out), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ai, bi, expect_s;
    for (int v = 0; v < 8; v++) begin
      {ai, bi, c_in} = 3'(v);
      c_out    = (ai & bi) | (c_in & (ai ^ bi));
      expect_s = ai ^ bi ^ c_in;
      for (int form = 0; form < 2; form++) begin
        if (form == 0) begin x = ai; y = bi; end
        else           begin x = ai | bi; y = ai & bi; end
        #1;
        checks++;
        if (s !== expect_s) begin
          failures++;
          $display("FAIL sum a=%b b=%b c=%b form=%0d s=%b", ai, bi, c_in, form, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
