// tb_wallace_mult: self-checking test of wallace_mult. The 4-bit default
// and an 8-bit instance are checked exhaustively, a 5-bit instance (uneven
// reduction 5 -> 4 -> 3 -> 2 rows) and a 2-bit one (no reduction layer)
// exhaustively too; expected products come from the simulator's '*'.
module tb_wallace_mult;
  logic [3:0] a4, b4;  logic [7:0]  p4;
  logic [7:0] a8, b8;  logic [15:0] p8;
  logic [4:0] a5, b5;  logic [9:0]  p5;
  logic [1:0] a2, b2;  logic [3:0]  p2;

  int checks = 0, failures = 0;

  wallace_mult          u4 (.a(a4), .b(b4), .p(p4));
  wallace_mult #(.N(8)) u8 (.a(a8), .b(b8), .p(p8));
  wallace_mult #(.N(5)) u5 (.a(a5), .b(b5), .p(p5));
  wallace_mult #(.N(2)) u2 (.a(a2), .b(b2), .p(p2));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) for (int j = 0; j < 256; j++) begin
      a8 = 8'(i); b8 = 8'(j);
      a4 = 4'(i); b4 = 4'(j);
      a5 = 5'(i); b5 = 5'(j);
      a2 = 2'(i); b2 = 2'(j);
      #1;
      check(p8 == 16'(i * j), $sformatf("8b %0d*%0d=%0d", i, j, p8));
      if (i < 16 && j < 16) check(p4 == 8'(i * j), $sformatf("4b %0d*%0d=%0d", i, j, p4));
      if (i < 32 && j < 32) check(p5 == 10'(i * j), $sformatf("5b %0d*%0d=%0d", i, j, p5));
      if (i < 4 && j < 4)   check(p2 == 4'(i * j), $sformatf("2b %0d*%0d=%0d", i, j, p2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
