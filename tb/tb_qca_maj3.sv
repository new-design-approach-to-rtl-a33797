// tb_qca_maj3 - exhaustive check of the majority gate: all eight input
// combinations against a population count (output 1 when two or more inputs
// are 1). Also checks the AND (third input 0) and OR (third input 1) uses.
module tb_qca_maj3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("FAIL maj3 in=%b y=%b", 3'(v), y);
      end
      // AND / OR behaviour when c is a constant
      if (c == 1'b0) begin
        checks++;
        if (y !== (a & b)) failures++;
      end else begin
        checks++;
        if (y !== (a | b)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
