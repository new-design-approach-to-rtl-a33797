// tb_qca_carry2_lsb - exhaustive check of the simplified least significant
// carry module (carry-in fixed at 0): all 16 operand combinations, with the
// expected c_1 and c_2 taken from integer addition of the 2-bit operands.
module tb_qca_carry2_lsb;
  logic [1:0] a, b;
  logic       c_mid, c_out;
  int checks = 0, failures = 0;

  qca_carry2_lsb dut (.a(a), .b(b), .c_mid(c_mid), .c_out(c_out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] total;
    logic [1:0] low;
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      total = 3'(a) + 3'(b);
      low   = 2'(a[0]) + 2'(b[0]);
      checks += 2;
      if (c_out !== total[2]) begin failures++; $display("FAIL c_out a=%b b=%b", a, b); end
      if (c_mid !== low[1])   begin failures++; $display("FAIL c_mid a=%b b=%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
