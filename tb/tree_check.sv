// tree_check: checking harness for one configuration of wallace_tree, used by
// tb_wallace_tree. It drives NVEC random matrices (random bits also in the
// positions outside MASK, which the tree must ignore) plus the all-ones
// matrix, and checks that row_a + row_b equals the sum of the masked rows
// modulo 2^W. The reference sum is computed with plain integer arithmetic.
module tree_check #(
  parameter int unsigned W = 8,
  parameter int unsigned ROWS = 3,
  parameter logic [ROWS-1:0][W-1:0] MASK = '1,
  parameter int unsigned NVEC = 1000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  logic [ROWS-1:0][W-1:0] pp;
  logic [W-1:0] row_a, row_b;

  wallace_tree #(.W(W), .ROWS(ROWS), .MASK(MASK)) dut (.pp(pp), .row_a(row_a), .row_b(row_b));

  task automatic check_one();
    logic [W-1:0] expv, got;
    #1;
    expv = '0;
    for (int r = 0; r < int'(ROWS); r++) expv = expv + (pp[r] & MASK[r]);
    got = row_a + row_b;
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d ROWS=%0d sum %h, expected %h", W, ROWS, got, expv);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    pp = '1;
    check_one();
    for (int v = 0; v < int'(NVEC); v++) begin
      for (int r = 0; r < int'(ROWS); r++)
        for (int k = 0; k < int'(W); k++) pp[r][k] = 1'($urandom);
      check_one();
    end
    done = 1'b1;
  end
endmodule
