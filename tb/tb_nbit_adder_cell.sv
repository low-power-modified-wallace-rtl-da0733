// tb_nbit_adder_cell: exhaustive check of the four-input adder cell over all
// 32 input combinations. Expected values come from the cell's truth table:
// cout is set when at least two of a..d are set, and {carry,sum} is the
// count of ones plus cin minus 2*cout. The arithmetic identity
// a+b+c+d+cin = sum + 2*(carry+cout) is checked as well.
module tb_nbit_adder_cell;
  logic a, b, c, d, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  nbit_adder_cell dut (.a(a), .b(b), .c(c), .d(d), .cin(cin),
                       .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, exp_cout, rest;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, cin} = 5'(v);
      #1;
      ones     = int'(a) + int'(b) + int'(c) + int'(d);
      exp_cout = (ones >= 2) ? 1 : 0;
      rest     = ones + int'(cin) - 2 * exp_cout;
      checks++;
      if (int'(cout) != exp_cout || int'(sum) != (rest % 2) || int'(carry) != (rest / 2)) begin
        failures++;
        $display("FAIL abcd=%0b%0b%0b%0b cin=%0b -> carry=%0b sum=%0b cout=%0b",
                 a, b, c, d, cin, carry, sum, cout);
      end
      checks++;
      if (ones + int'(cin) != int'(sum) + 2 * (int'(carry) + int'(cout))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
