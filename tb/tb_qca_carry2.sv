// tb_qca_carry2 - exhaustive check of the 2-bit carry module: all 32
// combinations of (a_{i+1}, a_i, b_{i+1}, b_i, c_i). Expected carries come
// from integer addition of the two 2-bit operands plus c_i; p and g are
// checked against OR and AND of the low operand bits.
module tb_qca_carry2;
  logic [1:0] a, b;
  logic       c_in, c_mid, c_out, p, g;
  int checks = 0, failures = 0;

  qca_carry2 dut (.a(a), .b(b), .c_in(c_in), .c_mid(c_mid), .c_out(c_out), .p(p), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] total;
    logic [1:0] low;
    for (int v = 0; v < 32; v++) begin
      {a, b, c_in} = 5'(v);
      #1;
      total = 3'(a) + 3'(b) + 3'(c_in);
      low   = 2'(a[0]) + 2'(b[0]) + 2'(c_in);
      checks += 4;
      if (c_out !== total[2]) begin failures++; $display("FAIL c_out a=%b b=%b c=%b", a, b, c_in); end
      if (c_mid !== low[1])   begin failures++; $display("FAIL c_mid a=%b b=%b c=%b", a, b, c_in); end
      if (p !== (a[0] | b[0])) failures++;
      if (g !== (a[0] & b[0])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
