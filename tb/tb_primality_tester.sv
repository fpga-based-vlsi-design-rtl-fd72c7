// tb_primality_tester: checks the trial-division primality tester.
// At W = 8 every value 0..255 is tested; at the default W = 16 a set of
// known primes and composites (including the largest 16-bit prime 65521,
// the square of the largest prime below 256, 251 * 251 = 63001, and
// 255 * 257 = 65535) plus random values are tested. The reference answer
// comes from a trial-division function written in the testbench.
module tb_primality_tester;
  logic clk = 0, rst = 1;
  logic s8 = 0, s16 = 0;
  logic [7:0]  c8;
  logic [15:0] c16;
  logic b8, d8, p8, b16, d16, p16;
  int checks = 0, failures = 0;

  primality_tester #(.W(8))  dut8  (.clk, .rst, .start(s8),  .cand(c8),  .busy(b8),  .done(d8),  .is_prime(p8));
  primality_tester          dut16 (.clk, .rst, .start(s16), .cand(c16), .busy(b16), .done(d16), .is_prime(p16));

  always #5 clk = ~clk;

  function automatic bit ref_prime(input int x);
    if (x < 2) return 0;
    for (int k = 2; k * k <= x; k++) if (x % k == 0) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic test8(input int x);
    @(negedge clk);
    c8 = 8'(x); s8 = 1;
    @(negedge clk);
    s8 = 0;
    while (!d8) @(negedge clk);
    checks++;
    if (p8 != ref_prime(x)) begin failures++; $display("FAIL W=8 %0d: got %0d", x, p8); end
  endtask

  task automatic test16(input int x);
    @(negedge clk);
    c16 = 16'(x); s16 = 1;
    @(negedge clk);
    s16 = 0;
    while (!d16) @(negedge clk);
    checks++;
    if (p16 != ref_prime(x)) begin failures++; $display("FAIL W=16 %0d: got %0d", x, p16); end
  endtask

  initial begin
    int list[] = '{0, 1, 2, 3, 4, 5, 9, 25, 49, 61, 53, 65521, 65519, 63001, 65535,
                   65025, 32771, 32769, 64009, 65533};
    c8 = '0; c16 = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int x = 0; x < 256; x++) test8(x);
    foreach (list[i]) test16(list[i]);
    for (int k = 0; k < 300; k++) test16(int'($urandom % 65536) | 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
