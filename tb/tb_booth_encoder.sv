// tb_booth_encoder: checks the radix-4 Booth recoding exhaustively for N=4
// (the multiplier's size), N=5 (odd, exercising the sign extension of y)
// and N=8. For every y the digits must be well formed (never both one and
// two) and must satisfy sum_i digit_i * 4^i = y as a signed number. Each
// digit is also compared with the value read from its own triplet of y.
module tb_booth_encoder;
  import mult_pkg::*;

  logic [3:0] y4;
  logic [4:0] y5;
  logic [7:0] y8;
  booth_digit_t [1:0] d4;
  booth_digit_t [2:0] d5;
  booth_digit_t [3:0] d8;
  int checks = 0, failures = 0;
  int seen [5];  // digit values -2..+2 seen, index value+2

  booth_encoder #(.N(4)) dut4 (.y(y4), .digit(d4));
  booth_encoder #(.N(5)) dut5 (.y(y5), .digit(d5));
  booth_encoder #(.N(8)) dut8 (.y(y8), .digit(d8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit_value(booth_digit_t d);
    int m;
    m = d.one ? 1 : (d.two ? 2 : 0);
    return d.neg ? -m : m;
  endfunction

  // Digit i of a signed value v, read from bits 2i+1, 2i, 2i-1 of v.
  function automatic int ref_digit(int v, int i);
    int b2, b1, b0;
    b2 = (v >>> (2 * i + 1)) & 1;
    b1 = (v >>> (2 * i)) & 1;
    b0 = (i == 0) ? 0 : ((v >>> (2 * i - 1)) & 1);
    return -2 * b2 + b1 + b0;
  endfunction

  task automatic check_digits(int n, int v, booth_digit_t d [], int nd);
    int total = 0, w = 1;
    for (int i = 0; i < nd; i++) begin
      checks++;
      if (d[i].one && d[i].two) begin
        failures++;
        $display("FAIL n=%0d y=%0d digit %0d has one and two", n, v, i);
      end
      checks++;
      if (digit_value(d[i]) != ref_digit(v, i)) begin
        failures++;
        $display("FAIL n=%0d y=%0d digit %0d = %0d, expected %0d", n, v, i, digit_value(d[i]), ref_digit(v, i));
      end
      seen[digit_value(d[i]) + 2]++;
      total += digit_value(d[i]) * w;
      w *= 4;
    end
    checks++;
    if (total != v) begin
      failures++;
      $display("FAIL n=%0d y=%0d digits sum to %0d", n, v, total);
    end
  endtask

  initial begin
    booth_digit_t dd [];
    for (int v = -8; v < 8; v++) begin
      y4 = 4'(v); #1;
      dd = new[2]; foreach (dd[i]) dd[i] = d4[i];
      check_digits(4, v, dd, 2);
    end
    for (int v = -16; v < 16; v++) begin
      y5 = 5'(v); #1;
      dd = new[3]; foreach (dd[i]) dd[i] = d5[i];
      check_digits(5, v, dd, 3);
    end
    for (int v = -128; v < 128; v++) begin
      y8 = 8'(v); #1;
      dd = new[4]; foreach (dd[i]) dd[i] = d8[i];
      check_digits(8, v, dd, 4);
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL digit value %0d never produced", k - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
