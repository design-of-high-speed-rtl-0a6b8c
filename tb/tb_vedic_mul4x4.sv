// tb_vedic_mul4x4: end-to-end self-check of the 4x4 Vedic multiplier.
// First the four operand pairs of the reference waveform (10*15, 1*2, 11*3, 2*11)
// and the worked case 4*4 are applied with their expected 8-bit products written
// out as constants; then all 256 operand pairs are compared with a * b. The
// multiplier is combinational, so every result is sampled 1 time unit after the
// inputs change (zero clock cycles of latency).
// It also counts, from a reference model of the adder tree, how often the
// operands exercise each carry path: the first adder's carry ca1, the second
// adder's carry ca2, and so a carry into position 2 of the third adder. A path
// that never fires counts as a failure.
module tb_vedic_mul4x4;
  logic [3:0] a, b;
  logic [7:0] s;
  logic       w;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_hi_carry = 0;

  vedic_mul4x4 dut (.a(a), .b(b), .s(s), .w(w));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [3:0] x, input logic [3:0] y, input logic [7:0] expected);
    a = x;
    b = y;
    #1;
    checks++;
    if (s !== expected || w !== 1'b0) begin
      failures++;
      $display("FAIL %0d * %0d -> s=%0d w=%0d, expected %0d", x, y, s, w, expected);
    end
    // Reference model of the carry paths, from the operands alone.
    begin
      int q0, q1, q2, mid, low;
      q0  = int'(x[1:0]) * int'(y[1:0]);
      q1  = int'(x[3:2]) * int'(y[1:0]);
      q2  = int'(x[1:0]) * int'(y[3:2]);
      mid = q1 + q2;
      low = (mid % 16) + q0 / 4;
      if (mid >= 16) n_ca1++;
      if (low >= 16) n_ca2++;
      if (mid >= 16 || low >= 16) n_hi_carry++;
    end
  endtask

  initial begin
    // Directed vectors with constants worked out by hand.
    apply(4'b1010, 4'b1111, 8'b10010110);
    apply(4'b0001, 4'b0010, 8'b00000010);
    apply(4'b1011, 4'b0011, 8'b00100001);
    apply(4'b0010, 4'b1011, 8'b00010110);
    apply(4'b0100, 4'b0100, 8'b00010000);
    apply(4'b1111, 4'b1011, 8'd165);   // needs the second adder's carry
    apply(4'b1111, 4'b1111, 8'd225);
    // Exhaustive sweep.
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        apply(4'(i), 4'(j), 8'(i * j));

    $display("mechanisms: ca1=%0d ca2=%0d carry_into_third_adder=%0d", n_ca1, n_ca2, n_hi_carry);
    if (n_ca1 == 0) begin failures++; $display("FAIL ca1 never set"); end
    if (n_ca2 == 0) begin failures++; $display("FAIL ca2 never set"); end
    if (n_hi_carry == 0) begin failures++; $display("FAIL no carry into the third adder"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
