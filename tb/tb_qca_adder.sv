// tb_qca_adder - end-to-end test of the adder at its default size (128 bits,
// with carry-in). Expected results come from the simulator's own 129-bit
// integer addition, not from the majority-gate structure.
//
// Vectors:
//   * the 128-bit operand pair of the published simulation (carry-in 1),
//     also compared against the leading and trailing digits of the printed
//     sum;
//   * worst-case carry paths: a carry generated at bit 0 and one entering
//     through cin, each rippling through all 128 bits into cout;
//   * alternating-bit patterns that make every 2-bit module propagate;
//   * 4000 random operand pairs with random carry-in.
// The testbench counts how often each carry mechanism was exercised (carry
// generated at bit 0 reaching cout, carry-in reaching cout, carry-in changing
// the result, carry-out set) and fails if one never occurred.
module tb_qca_adder;
  localparam int unsigned N = 128;

  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_gen0_to_cout = 0, n_cin_to_cout = 0, n_cin_effect = 0, n_cout = 0;

  qca_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N:0] ref_add(logic [N-1:0] x, logic [N-1:0] y, logic ci);
    return {1'b0, x} + {1'b0, y} + {{N{1'b0}}, ci};
  endfunction

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y, logic ci);
    logic [N:0] expect_v, expect_no_cin;
    logic [N-1:0] prop;
    a = x; b = y; cin = ci;
    #1;
    expect_v      = ref_add(x, y, ci);
    expect_no_cin = ref_add(x, y, 1'b0);
    checks++;
    if ({cout, sum} !== expect_v) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h expected %b_%h",
               x, y, ci, cout, sum, expect_v[N], expect_v[N-1:0]);
    end
    // mechanism bookkeeping
    prop = x ^ y;
    if (x[0] & y[0] && &prop[N-1:1]) n_gen0_to_cout++;
    if (ci && &prop) n_cin_to_cout++;
    if (ci && expect_v != expect_no_cin) n_cin_effect++;
    if (expect_v[N]) n_cout++;
  endtask

  initial begin
    logic [N-1:0] ra, rb;

    // Operands of the published 128-bit simulation, carry-in 1.
    apply(128'habcdefabcdef894056789a0b5abcdef1, 128'h1fedcba5b0a987650498fedcbafedcba, 1'b1);
    checks += 3;
    if (sum[127:56] !== 72'hcbbbbb517e9910a55b) begin failures++; $display("FAIL printed high digits"); end
    if (sum[39:0]   !== 40'he815bbbbac)         begin failures++; $display("FAIL printed low digits"); end
    if (cout !== 1'b0)                          begin failures++; $display("FAIL printed cout"); end

    // Worst case: carry generated at bit 0, propagated to the MSB.
    apply({N{1'b1}}, {{(N-1){1'b0}}, 1'b1}, 1'b0);
    apply({{(N-1){1'b1}}, 1'b0} | 128'h1, 128'h1, 1'b0);
    // Carry-in propagated through every bit.
    apply({N{1'b1}}, '0, 1'b1);
    apply({(N/2){2'b10}}, {(N/2){2'b01}}, 1'b1);
    apply({(N/2){2'b10}}, {(N/2){2'b01}}, 1'b0);
    // Generate at bit 0 and propagate only inside pairs / only across pairs.
    apply({(N/2){2'b01}}, {(N/2){2'b01}}, 1'b0);
    apply({(N/2){2'b11}}, {(N/2){2'b11}}, 1'b1);
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply({N{1'b1}}, {N{1'b1}}, 1'b1);

    // Every single-bit generate position, each rippling to the top.
    for (int i = 0; i < N; i++) begin
      ra = {N{1'b1}} << i;
      rb = 128'h1 << i;
      apply(ra, rb, 1'b0);
    end

    for (int t = 0; t < 4000; t++) begin
      for (int w = 0; w < N / 32; w++) begin
        ra[w*32 +: 32] = $urandom;
        rb[w*32 +: 32] = $urandom;
      end
      apply(ra, rb, 1'($urandom));
    end

    $display("mechanisms: gen0->cout=%0d cin->cout=%0d cin_effect=%0d cout=%0d",
             n_gen0_to_cout, n_cin_to_cout, n_cin_effect, n_cout);
    checks += 4;
    if (n_gen0_to_cout == 0) begin failures++; $display("FAIL no bit-0 carry reached cout"); end
    if (n_cin_to_cout == 0)  begin failures++; $display("FAIL no carry-in reached cout"); end
    if (n_cin_effect == 0)   begin failures++; $display("FAIL carry-in never changed a result"); end
    if (n_cout == 0)         begin failures++; $display("FAIL carry-out never set"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
