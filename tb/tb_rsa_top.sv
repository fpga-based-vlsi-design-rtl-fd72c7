// tb_rsa_top: end-to-end test of the RSA system at its default sizes
// (16-bit primes, 32-bit keys and data).
//  1. With external keys: encrypt M = 7 with e = 0x11, n = 0xCA1 (p = 61,
//     q = 53) and expect 0x941, then decrypt 0x941 with d = 0xAC1 and
//     expect 7.
//  2. Generate keys from several seeds. Each key is checked on its own
//     terms: n is factored by trial division in the testbench into two
//     distinct 16-bit primes with the top bit set, gcd(e, phi) = 1, e is the
//     first odd value from 17 up with that property, and e * d mod phi = 1.
//     Then random messages are encrypted with the generated public key,
//     the cipher text is compared with a 64-bit square-and-multiply model,
//     and it is decrypted with the generated private key back to the
//     message.
// Seed 5461 is chosen because its run meets a repeated prime and has to
// reject e = 17. The test counts how often each mechanism occurred
// (composite candidate dropped, repeated prime dropped, e rejected,
// external-key operation, generated-key encryption and decryption) and
// fails if one never did.
module tb_rsa_top;
  logic        clk = 0, rst = 1;
  logic        kg_start = 0;
  logic [15:0] kg_seed = '0;
  logic        kg_done, key_valid;
  logic [31:0] key_n, key_e, key_d;
  logic        use_gen_key = 0, decrypt = 0, ds = 0;
  logic [31:0] indata = '0, inexp = '0, inmod = '0, cypher;
  logic        ready;
  int checks = 0, failures = 0;
  int n_composite = 0, n_dup = 0, n_erej = 0, n_ext = 0, n_enc = 0, n_dec = 0;

  rsa_top dut (.*);

  always #5 clk = ~clk;

  function automatic bit is_prime(input longint unsigned x);
    if (x < 2) return 0;
    for (longint unsigned k = 2; k * k <= x; k++) if (x % k == 0) return 0;
    return 1;
  endfunction

  function automatic longint unsigned gcd(input longint unsigned a, input longint unsigned b);
    while (b != 0) begin
      longint unsigned t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

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

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: expected %0h got %0h", what, exp, got);
    end
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic core_run(input logic [31:0] data, input bit gen, input bit dec,
                          input logic [31:0] x, input logic [31:0] n);
    @(negedge clk);
    use_gen_key = gen; decrypt = dec;
    indata = data; inexp = x; inmod = n; ds = 1;
    @(negedge clk);
    ds = 0;
    while (!ready) @(negedge clk);
  endtask

  task automatic keygen(input logic [15:0] sd);
    longint unsigned n, p, q, phi, e0;
    @(negedge clk);
    kg_seed = sd; kg_start = 1;
    @(negedge clk);
    kg_start = 0;
    while (!kg_done) @(negedge clk);
    check("key_valid", key_valid, 1);
    n_composite += (dut.u_keygen.composites != 0);
    n_dup       += (dut.u_keygen.dups != 0);
    n_erej      += (key_e != 32'd17);
    n = key_n;
    p = 0;
    for (longint unsigned k = 3; k * k <= n; k += 2) if (n % k == 0) begin p = k; break; end
    q = (p != 0) ? n / p : 0;
    check("n splits into two primes", (p != 0) && is_prime(p) && is_prime(q) && p != q, 1);
    check("prime width", (p >= 32768) && (p < 65536) && (q >= 32768) && (q < 65536), 1);
    phi = (p - 1) * (q - 1);
    e0 = 17;
    while (gcd(phi, e0) != 1) e0 += 2;
    check("e", key_e, e0);
    check("e*d mod phi", (longint'(key_e) * longint'(key_d)) % phi, 1);
    for (int k = 0; k < 3; k++) begin
      longint unsigned m = 64'($urandom) % n;
      logic [31:0] c;
      core_run(32'(m), 1, 0, '1, '1);          // pins ignored with generated key
      check("encrypt", cypher, modexp(m, key_e, n));
      c = cypher;
      n_enc++;
      core_run(c, 1, 1, '1, '1);
      check("decrypt", cypher, m);
      n_dec++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // the worked example through the external key pins
    core_run(32'h7, 0, 0, 32'h11, 32'hCA1);
    check("example encrypt", cypher, 32'h941);
    n_ext++;
    core_run(32'h941, 0, 1, 32'hAC1, 32'hCA1);
    check("example decrypt", cypher, 32'h7);
    n_ext++;
    keygen(16'd5461);
    check("seed 5461 n", key_n, 64'd43691 * 64'd43649);
    check("seed 5461 e", key_e, 19);
    keygen(16'd0);
    for (int k = 0; k < 10; k++) keygen(16'($urandom));
    // the external key still works after keys were generated
    core_run(32'h941, 0, 1, 32'hAC1, 32'hCA1);
    check("example decrypt again", cypher, 32'h7);
    n_ext++;
    $display("mechanism count: composite dropped %0d, repeated prime dropped %0d, e rejected %0d, external key %0d, encrypt %0d, decrypt %0d",
             n_composite, n_dup, n_erej, n_ext, n_enc, n_dec);
    checks += 6;
    if (n_composite == 0) begin failures++; $display("FAIL no composite dropped"); end
    if (n_dup == 0)       begin failures++; $display("FAIL no repeated prime"); end
    if (n_erej == 0)      begin failures++; $display("FAIL no e rejected"); end
    if (n_ext == 0)       begin failures++; $display("FAIL no external key use"); end
    if (n_enc == 0)       begin failures++; $display("FAIL no encryption"); end
    if (n_dec == 0)       begin failures++; $display("FAIL no decryption"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
