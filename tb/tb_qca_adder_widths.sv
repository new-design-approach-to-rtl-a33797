// tb_qca_adder_widths - runs the adder at the operand widths of the published
// comparison (8 to 128 bits, plus the 4-bit case) in both configurations:
// with a carry-in port and with the carry-in tied to 0 (simplified least
// significant module). All twelve instances see the low bits of the same
// random operands; each result is checked against integer addition at its
// own width. A carry generated at bit 0 and rippling to the top is applied
// to every instance.
module tb_qca_adder_widths;
  localparam int NW = 6;
  localparam int unsigned WIDTHS [NW] = '{4, 8, 16, 32, 64, 128};

  logic [127:0] a, b;
  logic         cin;
  logic [127:0] sum_c  [NW];   // HAS_CIN = 1
  logic [127:0] sum_nc [NW];   // HAS_CIN = 0
  logic         cout_c [NW];
  logic         cout_nc[NW];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int unsigned W = WIDTHS[k];
    logic [W-1:0] s_c, s_nc;

    qca_adder #(.N(W), .HAS_CIN(1'b1)) u_c (
      .a(a[W-1:0]), .b(b[W-1:0]), .cin(cin), .sum(s_c), .cout(cout_c[k]));
    qca_adder #(.N(W), .HAS_CIN(1'b0)) u_nc (
      .a(a[W-1:0]), .b(b[W-1:0]), .cin(cin), .sum(s_nc), .cout(cout_nc[k]));

    always_comb begin
      sum_c[k]  = 128'(s_c);
      sum_nc[k] = 128'(s_nc);
    end
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [128:0] mask, ref_c, ref_nc;
    #1;
    for (int k = 0; k < NW; k++) begin
      mask   = (129'h1 << WIDTHS[k]) - 129'h1;
      ref_c  = ({1'b0, a} & mask) + ({1'b0, b} & mask) + 129'(cin);
      ref_nc = ({1'b0, a} & mask) + ({1'b0, b} & mask);
      checks += 2;
      if ({cout_c[k], sum_c[k]} !== {ref_c[WIDTHS[k]], ref_c[127:0] & mask[127:0]}) begin
        failures++;
        $display("FAIL N=%0d cin a=%h b=%h cin=%b", WIDTHS[k], a, b, cin);
      end
      if ({cout_nc[k], sum_nc[k]} !== {ref_nc[WIDTHS[k]], ref_nc[127:0] & mask[127:0]}) begin
        failures++;
        $display("FAIL N=%0d no-cin a=%h b=%h", WIDTHS[k], a, b);
      end
    end
  endtask

  initial begin
    // carry generated at bit 0, rippling to the top of every width
    a = '1; b = 128'h1; cin = 1'b0; check_all();
    a = '1; b = '0;     cin = 1'b1; check_all();
    for (int t = 0; t < 3000; t++) begin
      for (int w = 0; w < 4; w++) begin
        a[w*32 +: 32] = $urandom;
        b[w*32 +: 32] = $urandom;
      end
      cin = 1'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
