// tb_cla_adder: self-checking test of cla_adder. The 16-bit default is
// checked on random and corner operands with both carry-in values, plus a
// 13-bit instance (width not a multiple of the group size) exhaustively
// against a 7-bit slice and a 128-bit instance on random values; the expected
// sums come from the simulator's own addition.
module tb_cla_adder;
  logic [15:0]  a16, b16, s16;
  logic         ci16, co16;
  logic [12:0]  a13, b13, s13;
  logic         ci13, co13;
  logic [127:0] a128, b128, s128;
  logic         ci128, co128;

  int checks = 0, failures = 0;

  cla_adder                  u16  (.a(a16),  .b(b16),  .cin(ci16),  .sum(s16),  .cout(co16));
  cla_adder #(.WIDTH(13))    u13  (.a(a13),  .b(b13),  .cin(ci13),  .sum(s13),  .cout(co13));
  cla_adder #(.WIDTH(128))   u128 (.a(a128), .b(b128), .cin(ci128), .sum(s128), .cout(co128));

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
    logic [16:0]  e16;
    logic [13:0]  e13;
    logic [128:0] e128;
    logic [15:0]  corner [0:5];
    corner = '{16'h0000, 16'hFFFF, 16'h0001, 16'h8000, 16'h7FFF, 16'hAAAA};
    foreach (corner[i]) foreach (corner[j]) for (int c = 0; c < 2; c++) begin
      a16 = corner[i]; b16 = corner[j]; ci16 = c[0];
      #1;
      e16 = {1'b0, a16} + {1'b0, b16} + 17'(ci16);
      check({co16, s16} == e16, $sformatf("16b corner %h+%h+%0d", a16, b16, ci16));
    end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom); ci13 = 1'($urandom);
      a128 = {$urandom, $urandom, $urandom, $urandom};
      b128 = (n % 4 == 0) ? ~a128 : {$urandom, $urandom, $urandom, $urandom};
      ci128 = 1'($urandom);
      #1;
      e16  = {1'b0, a16} + {1'b0, b16} + 17'(ci16);
      e13  = {1'b0, a13} + {1'b0, b13} + 14'(ci13);
      e128 = {1'b0, a128} + {1'b0, b128} + 129'(ci128);
      check({co16, s16} == e16, $sformatf("16b %h+%h+%0d", a16, b16, ci16));
      check({co13, s13} == e13, $sformatf("13b %h+%h+%0d", a13, b13, ci13));
      check({co128, s128} == e128, $sformatf("128b %h+%h+%0d", a128, b128, ci128));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
