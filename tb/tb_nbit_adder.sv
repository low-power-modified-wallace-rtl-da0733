// tb_nbit_adder: checks the final carry-propagate adder. An 8-bit instance
// (the width used by the 4x4 multiplier) is tested exhaustively over both
// operands and the carry in; a 32-bit instance gets edge cases (all-ones
// carry chains) and random operands. Expected values are plain integer sums.
module tb_nbit_adder;
  logic [7:0]  x8, y8, s8;
  logic        c8, co8;
  logic [31:0] x32, y32, s32;
  logic        c32, co32;
  int checks = 0, failures = 0;

  nbit_adder #(.W(8))  dut8  (.x(x8),  .y(y8),  .cin(c8),  .sum(s8),  .cout_o(co8));
  nbit_adder #(.W(32)) dut32 (.x(x32), .y(y32), .cin(c32), .sum(s32), .cout_o(co32));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(logic [31:0] a, logic [31:0] b, logic ci);
    logic [32:0] e;
    x32 = a; y32 = b; c32 = ci;
    #1;
    e = {1'b0, a} + {1'b0, b} + 33'(ci);
    checks++;
    if ({co32, s32} != e) begin
      failures++;
      $display("FAIL32 %h + %h + %0b = %h, got %h", a, b, ci, e, {co32, s32});
    end
  endtask

  initial begin
    logic [8:0] e;
    for (int v = 0; v < 2 * 256 * 256; v++) begin
      {c8, x8, y8} = 17'(v);
      #1;
      e = {1'b0, x8} + {1'b0, y8} + 9'(c8);
      checks++;
      if ({co8, s8} != e) begin
        failures++;
        if (failures < 10) $display("FAIL8 %h + %h + %0b = %h, got %h", x8, y8, c8, e, {co8, s8});
      end
    end
    check32(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    check32(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    check32(32'h0, 32'h0, 1'b0);
    for (int i = 0; i < 20000; i++) check32($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
