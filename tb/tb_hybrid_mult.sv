// tb_hybrid_mult: self-checking test of hybrid_mult at its default 64-bit
// width. Operands stream in with random gaps; each product must appear with
// out_valid exactly one clock after its operands, and the register must hold
// while in_valid is low. Expected products come from the simulator's '*'.
module tb_hybrid_mult;
  localparam int unsigned N = 64;

  logic           clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [N-1:0]   a = '0, b = '0;
  logic           out_valid;
  logic [2*N-1:0] p;

  int checks = 0, failures = 0;

  hybrid_mult dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] last;
    last = '0;
    repeat (2) @(negedge clk);
    check(!out_valid && p == '0, "reset state");
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      bit go;
      logic [2*N-1:0] exp_p;
      go = (n < 10) || ($urandom_range(0, 4) != 0);
      in_valid = go;
      a = (n % 7 == 0) ? '1 : {$urandom, $urandom};
      b = (n % 11 == 0) ? '1 : {$urandom, $urandom};
      exp_p = (2*N)'(a) * (2*N)'(b);
      @(negedge clk);
      check(out_valid == go, "out_valid one cycle after in_valid");
      if (go) begin
        check(p == exp_p, $sformatf("%h*%h got %h", a, b, p));
        last = exp_p;
      end else begin
        check(p == last, "product held while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
