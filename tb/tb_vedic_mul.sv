// tb_vedic_mul: checks the NxN Urdhva multiplier at three sizes.
// N = 8 (the 8x8 "utm8" multiplier) is checked exhaustively, including the
// two traced products 09 x 07 = 003F and 09 x 0E = 007E; N = 16 and N = 32
// (the sizes used by the key generator and the RSA core) are checked with
// random operands and the corner values 0, 1 and all ones. Reference
// products come from the simulator's 64-bit multiplication.
module tb_vedic_mul;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  int checks = 0, failures = 0;

  vedic_mul #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mul #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mul #(.N(32)) dut32 (.a(a32), .b(b32), .p(p32));

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: expected %h got %h", what, exp, got);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the two products shown on the 8-bit multiplier's trace
    a8 = 8'h09; b8 = 8'h07; #1 check("09*07", p8, 64'h003F);
    a8 = 8'h09; b8 = 8'h0E; #1 check("09*0E", p8, 64'h007E);
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1 check("mul8", p8, longint'(i) * longint'(j));
      end
    end
    for (int k = 0; k < 20000; k++) begin
      longint unsigned x, y;
      unique case (k)
        0: begin x = 0; y = 64'hFFFF_FFFF; end
        1: begin x = 1; y = 64'hFFFF_FFFF; end
        2: begin x = 64'hFFFF_FFFF; y = 64'hFFFF_FFFF; end
        default: begin x = 64'($urandom); y = 64'($urandom); end
      endcase
      a32 = 32'(x); b32 = 32'(y);
      a16 = 16'(x); b16 = 16'(y);
      #1;
      check("mul32", p32, x * y);
      check("mul16", p16, (x & 64'hFFFF) * (y & 64'hFFFF));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
