// tb_partial_full_adder: exhaustive self-check of the partial full adder.
// The sum must be the parity of the three inputs, generate must be set only when
// both operand bits are 1, and propagate when at least one is.
module tb_partial_full_adder;
  logic a, b, ci, s, p, g;
  int checks = 0, failures = 0;

  partial_full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .p(p), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int total;
      {a, b, ci} = 3'(i);
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks += 3;
      if (s != total[0]) begin failures++; $display("FAIL s at %03b", i[2:0]); end
      if (g != (int'(a) + int'(b) == 2)) begin failures++; $display("FAIL g at %03b", i[2:0]); end
      if (p != (int'(a) + int'(b) >= 1)) begin failures++; $display("FAIL p at %03b", i[2:0]); end
      // The lookahead relation cout = g | p&ci must give the full-adder carry.
      checks++;
      if ((g | (p & ci)) != (total >= 2)) begin failures++; $display("FAIL carry at %03b", i[2:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
