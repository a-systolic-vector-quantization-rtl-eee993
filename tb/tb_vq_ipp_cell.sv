// tb_vq_ipp_cell: exhaustive check of the latched full adder cell.
// Both variants (plain b and complemented b) are driven with every input
// combination; one clock later the latched sum, carry and a outputs are
// compared with the binary sum of the partial product, s_i and c_i.
module tb_vq_ipp_cell;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a, b, s, c;
  logic a0, s0, c0, a1, s1, c1;

  vq_ipp_cell #(.INV_B(1'b0)) dut0 (.clk, .rst_n, .a_i(a), .b_i(b), .s_i(s), .c_i(c),
                                    .a_o(a0), .s_o(s0), .c_o(c0));
  vq_ipp_cell #(.INV_B(1'b1)) dut1 (.clk, .rst_n, .a_i(a), .b_i(b), .s_i(s), .c_i(c),
                                    .a_o(a1), .s_o(s1), .c_o(c1));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; a = 0; b = 0; s = 0; c = 0;
    repeat (2) @(negedge clk);
    check(s0, 1'b0, "reset s"); check(c0, 1'b0, "reset c");
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 16; v++) begin
        int pp0, pp1, sum0, sum1;
        logic p0, p1;
        {a, b, s, c} = 4'(v);
        p0 = a & b;
        p1 = a & !b;
        pp0 = int'(p0);
        pp1 = int'(p1);
        sum0 = pp0 + int'(s) + int'(c);
        sum1 = pp1 + int'(s) + int'(c);
        @(negedge clk);
        check(s0, sum0[0], "s plain");   check(c0, sum0[1], "c plain");
        check(s1, sum1[0], "s inv");     check(c1, sum1[1], "c inv");
        check(a0, a, "a plain");         check(a1, a, "a inv");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
