// mult_check: end-to-end checking harness for one size of wallace_multiplier,
// used by tb_wallace_multiplier. It applies every pair of N-bit operands when
// EXHAUSTIVE is set, then NRAND random pairs and the corner pairs built from
// 0, 1, -1, the most negative and the most positive value, and compares p
// with the signed integer product. It also counts, from the operands alone,
// how often each kind of radix-4 Booth digit occurred (0, +1, +2, -1, -2 and
// the all-ones triplet that encodes -0), so that the caller can require
// every selection path of the partial product generator to be exercised.
module mult_check #(
  parameter int unsigned N = 4,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int unsigned NRAND = 0
) (
  output int   checks,
  output int   failures,
  output int   seen [6],  // digits 0, +1, +2, -1, -2, -0 (triplet 111)
  output logic done
);
  localparam int unsigned D = (N + 1) / 2;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;

  wallace_multiplier #(.N(N)) dut (.x(x), .y(y), .p(p));

  function automatic longint sext(logic [N-1:0] v);
    return v[N-1] ? longint'(v) - (longint'(1) << N) : longint'(v);
  endfunction

  task automatic apply(logic [N-1:0] a, logic [N-1:0] b);
    longint prod, ys;
    logic [2*N-1:0] e;
    int b2, b1, b0, dv;
    x = a; y = b;
    #1;
    prod = sext(a) * sext(b);
    e = (2 * N)'(prod);
    checks++;
    if (p != e) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d %0d * %0d = %0d, got %h", N, sext(a), sext(b), prod, p);
    end
    ys = sext(b);
    for (int i = 0; i < int'(D); i++) begin
      b2 = int'((ys >>> (2 * i + 1)) & 1);
      b1 = int'((ys >>> (2 * i)) & 1);
      b0 = (i == 0) ? 0 : int'((ys >>> (2 * i - 1)) & 1);
      dv = -2 * b2 + b1 + b0;
      if (b2 == 1 && b1 == 1 && b0 == 1) seen[5]++;
      else if (dv >= 0) seen[dv]++;
      else seen[2 - dv]++;
    end
  endtask

  initial begin
    logic [N-1:0] corner [5];
    checks = 0; failures = 0; done = 1'b0;
    for (int k = 0; k < 6; k++) seen[k] = 0;
    corner[0] = '0;
    corner[1] = N'(1);
    corner[2] = '1;
    corner[3] = {1'b1, {(N - 1){1'b0}}};
    corner[4] = {1'b0, {(N - 1){1'b1}}};
    if (EXHAUSTIVE) begin
      for (longint a = 0; a < (longint'(1) << N); a++)
        for (longint b = 0; b < (longint'(1) << N); b++)
          apply(N'(a), N'(b));
    end
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) apply(corner[i], corner[j]);
    for (int unsigned v = 0; v < NRAND; v++)
      apply(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
    done = 1'b1;
  end
endmodule
