// tb_rsa_core: checks the modular exponentiation engine.
// First the worked example with p = 61, q = 53: encrypting 7 with the public
// key (e = 0x11, n = 0xCA1) must give 0x941, and decrypting 0x941 with the
// private key (d = 0xAC1) must give 7 back. Then random data, exponents and
// moduli (including data >= n, exponent 0 and 1, n = 1 and full 32-bit
// values) are compared with a square-and-multiply model computed in 64-bit
// arithmetic in the testbench. Every run also checks the latency from ds
// to ready, (1 + h + k) * (2W + 3) + 1 cycles, with h the number of set
// exponent bits and k the index of the highest one.
module tb_rsa_core;
  localparam int W = 32;
  logic         clk = 0, rst = 1, ds = 0;
  logic [W-1:0] indata = '0, inexp = '0, inmod = '0, cypher;
  logic         ready;
  int checks = 0, failures = 0;

  rsa_core dut (.*);

  always #5 clk = ~clk;

  function automatic longint unsigned modexp(input longint unsigned m, input longint unsigned x,
                                             input longint unsigned n);
    longint unsigned r = 1 % n, b = m % n;
    while (x != 0) begin
      if (x[0]) r = (r * b) % n;
      b = (b * b) % n;
      x = x >> 1;
    end
    return r;
  endfunction

  function automatic int expected_cycles(input longint unsigned x);
    int h = 0, k = 0;
    for (int i = 0; i < W; i++) if (x[i]) begin h++; k = i; end
    return (1 + h + k) * (2 * W + 3) + 1;
  endfunction

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: expected %h got %h", what, exp, got);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint unsigned m, input longint unsigned x, input longint unsigned n);
    int cycles;
    @(negedge clk);
    indata = W'(m); inexp = W'(x); inmod = W'(n); ds = 1;
    @(negedge clk);
    ds = 0;
    indata = '1; inexp = '1; inmod = '1;   // inputs only matter at ds
    cycles = 1;
    while (!ready) begin @(negedge clk); cycles++; end
    check("cypher", cypher, modexp(m, x, n));
    check("latency", cycles, expected_cycles(x));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    check("ready after reset", ready, 1);
    run(64'h7, 64'h11, 64'hCA1);
    check("encrypt 7", cypher, 64'h941);
    run(64'h941, 64'hAC1, 64'hCA1);
    check("decrypt 941", cypher, 64'h7);
    run(5, 0, 3233);
    run(5, 1, 3233);
    run(5000, 3, 3233);
    run(5, 7, 1);
    run(64'hFFFF_FFFF, 64'hFFFF_FFFF, 64'hFFFF_FFFB);
    for (int k = 0; k < 150; k++) begin
      longint unsigned m = 64'($urandom), x = 64'($urandom), n = 64'($urandom);
      if (k % 4 == 1) x = x >> ($urandom % 32);
      if (k % 4 == 2) n = n >> ($urandom % 28);
      if (n == 0) n = 3233;
      run(m, x, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
