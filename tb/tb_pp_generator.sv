// tb_pp_generator: runs the pp_generator checks exhaustively for N = 4 (the
// multiplier's size), N = 5 (odd size) and N = 8.
module tb_pp_generator;
  int   c4, f4, c5, f5, c8, f8;
  logic d4, d5, d8;
  int   checks, failures;

  pp_check #(.N(4)) u4 (.checks(c4), .failures(f4), .done(d4));
  pp_check #(.N(5)) u5 (.checks(c5), .failures(f5), .done(d5));
  pp_check #(.N(8)) u8 (.checks(c8), .failures(f8), .done(d8));

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c5 + c8, f4 + f5 + f8 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d4 === 1'b1 && d5 === 1'b1 && d8 === 1'b1);
    checks = c4 + c5 + c8;
    failures = f4 + f5 + f8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
