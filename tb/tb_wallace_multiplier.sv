// tb_wallace_multiplier: end-to-end test of the signed Booth/Wallace
// multiplier at several sizes: N = 4 (the design's size) and N = 5 and 8
// over all operand pairs, N = 16 and N = 32 on random and corner operands.
// The larger sizes exercise the 4:2 compressors of the reduction tree,
// which the 4x4 matrix is too shallow to need. Every kind of Booth digit
// (0, +1, +2, -1, -2 and -0) must have occurred; a kind that never did
// counts as a failure.
module tb_wallace_multiplier;
  localparam int NI = 5;
  int   c [NI], f [NI];
  int   s [NI][6];
  logic d [NI];
  int   checks, failures;

  mult_check #(.N(4),  .EXHAUSTIVE(1'b1), .NRAND(0))     u4  (.checks(c[0]), .failures(f[0]), .seen(s[0]), .done(d[0]));
  mult_check #(.N(5),  .EXHAUSTIVE(1'b1), .NRAND(0))     u5  (.checks(c[1]), .failures(f[1]), .seen(s[1]), .done(d[1]));
  mult_check #(.N(8),  .EXHAUSTIVE(1'b1), .NRAND(0))     u8  (.checks(c[2]), .failures(f[2]), .seen(s[2]), .done(d[2]));
  mult_check #(.N(16), .EXHAUSTIVE(1'b0), .NRAND(50000)) u16 (.checks(c[3]), .failures(f[3]), .seen(s[3]), .done(d[3]));
  mult_check #(.N(32), .EXHAUSTIVE(1'b0), .NRAND(20000)) u32 (.checks(c[4]), .failures(f[4]), .seen(s[4]), .done(d[4]));

  function automatic int sum_c();
    int t = 0;
    for (int i = 0; i < NI; i++) t += c[i];
    return t;
  endfunction
  function automatic int sum_f();
    int t = 0;
    for (int i = 0; i < NI; i++) t += f[i];
    return t;
  endfunction

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", sum_c(), sum_f() + 1);
    $finish;
  end

  initial begin
    string names [6];
    names = '{"0", "+1", "+2", "-1", "-2", "-0"};
    #1;
    wait (d[0] === 1'b1 && d[1] === 1'b1 && d[2] === 1'b1 && d[3] === 1'b1 && d[4] === 1'b1);
    checks = sum_c();
    failures = sum_f();
    for (int i = 0; i < NI; i++) begin
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (s[i][k] == 0) begin
          failures++;
          $display("FAIL instance %0d never saw Booth digit %s", i, names[k]);
        end
      end
    end
    $display("Booth digits seen at N=4: 0:%0d +1:%0d +2:%0d -1:%0d -2:%0d -0:%0d",
             s[0][0], s[0][1], s[0][2], s[0][3], s[0][4], s[0][5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
