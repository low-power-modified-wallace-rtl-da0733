// pp_check: checking harness for one size of pp_generator, used by
// tb_pp_generator. For every pair (x, y) of N-bit values (all pairs) it
// recodes y into Booth digits on its own, drives the generator and checks:
// row i equals (digit_i * x - neg_i) * 4^i modulo 2^(2N); the hot-one row
// holds neg_i at column 2i and nothing else; and all rows together sum to
// x*y. Counts are reported on the outputs once done is set.
module pp_check
  import mult_pkg::*;
#(
  parameter int unsigned N = 4
) (
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned D = booth_digits(N);
  localparam int unsigned W = 2 * N;
  localparam int unsigned ROWS = D + 1;

  logic [N-1:0]           x;
  booth_digit_t [D-1:0]   digit;
  logic [ROWS-1:0][W-1:0] pp;

  pp_generator #(.N(N)) dut (.x(x), .digit(digit), .pp(pp));

  initial begin
    longint xs, ys, dv, total, rowv, prod;
    longint modw;
    int b2, b1, b0;
    logic [W-1:0] hot;
    checks = 0; failures = 0; done = 1'b0;
    modw = longint'(1) << W;
    for (longint xi = 0; xi < (longint'(1) << N); xi++) begin
      for (longint yi = 0; yi < (longint'(1) << N); yi++) begin
        xs = (xi >= (longint'(1) << (N - 1))) ? xi - (longint'(1) << N) : xi;
        ys = (yi >= (longint'(1) << (N - 1))) ? yi - (longint'(1) << N) : yi;
        x = N'(xi);
        hot = '0;
        for (int i = 0; i < int'(D); i++) begin
          b2 = int'((ys >>> (2 * i + 1)) & 1);
          b1 = int'((ys >>> (2 * i)) & 1);
          b0 = (i == 0) ? 0 : int'((ys >>> (2 * i - 1)) & 1);
          dv = -2 * b2 + b1 + b0;
          digit[i].neg = (b2 == 1);
          digit[i].one = (dv == 1 || dv == -1);
          digit[i].two = (dv == 2 || dv == -2);
          if (b2 == 1) hot[2*i] = 1'b1;
        end
        #1;
        total = 0;
        for (int i = 0; i < int'(D); i++) begin
          b2 = int'((ys >>> (2 * i + 1)) & 1);
          b1 = int'((ys >>> (2 * i)) & 1);
          b0 = (i == 0) ? 0 : int'((ys >>> (2 * i - 1)) & 1);
          dv = -2 * b2 + b1 + b0;
          rowv = ((dv * xs - b2) << (2 * i)) & (modw - 1);
          checks++;
          if (longint'(pp[i]) != rowv) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d x=%0d y=%0d row %0d = %h, expected %h", N, xs, ys, i, pp[i], rowv);
          end
          total += longint'(pp[i]);
        end
        checks++;
        if (pp[D] != hot) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d x=%0d y=%0d hot ones %b, expected %b", N, xs, ys, pp[D], hot);
        end
        total += longint'(pp[D]);
        prod = (xs * ys) & (modw - 1);
        checks++;
        if ((total & (modw - 1)) != prod) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d x=%0d y=%0d rows sum to %h", N, xs, ys, total & (modw - 1));
        end
      end
    end
    done = 1'b1;
  end
endmodule
