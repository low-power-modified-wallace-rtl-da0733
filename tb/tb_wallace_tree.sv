// tb_wallace_tree: checks the reduction tree on four matrix shapes:
//   - the Booth matrix of the 4x4 multiplier (three rows, 8 columns),
//   - the Booth matrix of an 8x8 multiplier (five rows, 16 columns),
//   - a full 8-row by 16-column matrix, which needs 4:2 compressors,
//   - the triangular matrix of a 6x6 AND-array multiplier (6 rows, 12 columns).
module tb_wallace_tree;
  import mult_pkg::*;

  function automatic logic [2:0][7:0] booth4();
    for (int r = 0; r < 3; r++) booth4[r] = 8'(booth_row_mask(4, r));
  endfunction
  function automatic logic [4:0][15:0] booth8();
    for (int r = 0; r < 5; r++) booth8[r] = 16'(booth_row_mask(8, r));
  endfunction
  function automatic logic [5:0][11:0] tri6();
    for (int r = 0; r < 6; r++) tri6[r] = 12'(12'h03F << r);
  endfunction

  int c [4], f [4];
  logic d [4];

  tree_check #(.W(8),  .ROWS(3), .MASK(booth4()), .NVEC(2000)) u0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  tree_check #(.W(16), .ROWS(5), .MASK(booth8()), .NVEC(2000)) u1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  tree_check #(.W(16), .ROWS(8), .MASK('1),       .NVEC(2000)) u2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  tree_check #(.W(12), .ROWS(6), .MASK(tri6()),   .NVEC(2000)) u3 (.checks(c[3]), .failures(f[3]), .done(d[3]));

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d[0] === 1'b1 && d[1] === 1'b1 && d[2] === 1'b1 && d[3] === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end
endmodule
