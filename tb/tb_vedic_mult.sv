// tb_vedic_mult: self-checking test of vedic_mult. The 8-bit default is
// checked exhaustively; 16-, 32- and 64-bit instances on random and corner
// operands (all ones, single bits). Expected products come from the
// simulator's '*'.
module tb_vedic_mult;
  logic [7:0]  a8,  b8;  logic [15:0]  p8;
  logic [15:0] a16, b16; logic [31:0]  p16;
  logic [31:0] a32, b32; logic [63:0]  p32;
  logic [63:0] a64, b64; logic [127:0] p64;

  int checks = 0, failures = 0;

  vedic_mult           u8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mult #(.N(16)) u16 (.a(a16), .b(b16), .p(p16));
  vedic_mult #(.N(32)) u32 (.a(a32), .b(b32), .p(p32));
  vedic_mult #(.N(64)) u64 (.a(a64), .b(b64), .p(p64));

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
      #1;
      check(p8 == 16'(i * j), $sformatf("8b %0d*%0d=%0d", i, j, p8));
    end
    for (int n = 0; n < 5000; n++) begin
      case (n % 5)
        0: begin a64 = '1; b64 = {$urandom, $urandom}; end
        1: begin a64 = 64'd1 << (n % 64); b64 = {$urandom, $urandom}; end
        2: begin a64 = '1; b64 = '1; end
        default: begin a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; end
      endcase
      a32 = a64[63:32]; b32 = b64[31:0];
      a16 = a64[15:0];  b16 = b64[47:32];
      #1;
      check(p64 == 128'(a64) * 128'(b64), $sformatf("64b %h*%h", a64, b64));
      check(p32 == 64'(a32) * 64'(b32),   $sformatf("32b %h*%h", a32, b32));
      check(p16 == 32'(a16) * 32'(b16),   $sformatf("16b %h*%h", a16, b16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
