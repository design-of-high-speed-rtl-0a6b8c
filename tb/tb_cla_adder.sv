// tb_cla_adder: exhaustive self-check of the 4-bit carry lookahead adder:
// all 512 combinations of a, b and cin against a + b + cin.
module tb_cla_adder;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla_adder #(.W(4)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 2; k++) begin
          a = 4'(i);
          b = 4'(j);
          cin = k[0];
          #1;
          checks++;
          if ({cout, sum} != 5'(i + j + k)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d -> %0d", i, j, k, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
