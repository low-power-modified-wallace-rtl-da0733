// tb_wallace_multiplier_full: the multiplier at its default size (4 x 4,
// signed) over all 256 operand pairs, compared with the integer product.
module tb_wallace_multiplier_full;
  logic [3:0] x, y;
  logic [7:0] p;
  int checks = 0, failures = 0;

  wallace_multiplier dut (.x(x), .y(y), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prod;
    for (int a = -8; a < 8; a++) begin
      for (int b = -8; b < 8; b++) begin
        x = 4'(a);
        y = 4'(b);
        #1;
        prod = a * b;
        checks++;
        if (int'($signed(p)) != prod) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, got %0d", a, b, prod, $signed(p));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
