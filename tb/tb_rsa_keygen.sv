// tb_rsa_keygen: checks key generation end to end against a model.
// The testbench replays the random number generator (same recurrence,
// same seed), forms the same candidates, tests them with its own trial
// division, picks the first two distinct primes and the first odd e from
// 17 up that is coprime with phi, and expects exactly those p, q, n, phi, e
// and the same counts of composites, repeated primes and rejected e. d is
// checked by e * d mod phi = 1, and a message is encrypted and decrypted
// with the key in 64-bit arithmetic. Twenty-one seeds are run (one chosen so that e = 17 is rejected, and
// seed 5461, which meets a repeated prime) at the default
// 16-bit primes. A second instance with 8-bit primes and a first e of
// 40001, too large for the totient of some prime pairs, exercises the
// restart that discards both primes.
module tb_rsa_keygen;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  int seen_composite = 0, seen_dup = 0, seen_ereject = 0, seen_restart = 0;

  // default instance: 16-bit primes, 32-bit keys
  logic        start = 0;
  logic [15:0] seed = '0;
  logic        busy, done, key_valid;
  logic [31:0] key_n, key_e, key_d, phi;
  logic [15:0] p, q, composites;
  logic [7:0]  dups, e_rejects, restarts;

  rsa_keygen dut (.*);

  // small instance with a large first e
  localparam int SE_INIT = 40001;
  logic        s_start = 0;
  logic        s_busy, s_done, s_valid;
  logic [15:0] s_n, s_e, s_d, s_phi;
  logic [7:0]  s_p, s_q;
  logic [15:0] s_comp;
  logic [7:0]  s_dups, s_erej, s_rest;

  rsa_keygen #(.PRIME_W(8), .E_INIT(SE_INIT)) dut_s (
    .clk, .rst, .start(s_start), .seed, .busy(s_busy), .done(s_done), .key_valid(s_valid),
    .key_n(s_n), .key_e(s_e), .key_d(s_d), .p(s_p), .q(s_q), .phi(s_phi),
    .composites(s_comp), .dups(s_dups), .e_rejects(s_erej), .restarts(s_rest)
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

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
      $display("FAIL %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  // reference model of one key generation run
  typedef struct {
    longint unsigned p, q, n, phi, e;
    int composites, dups, erej, restarts;
  } ref_t;

  function automatic ref_t model(input logic [15:0] sd, input int w, input longint unsigned e_init);
    ref_t r = '{default: 0};
    logic [15:0] s = (sd == 0) ? 16'hACE1 : sd;
    bit have_p = 0;
    forever begin
      longint unsigned c;
      s = lfsr_next(s);
      c = (longint'(s) & ((64'd1 << w) - 1)) | (64'd1 << (w - 1)) | 64'd1;
      if (!is_prime(c)) begin r.composites++; continue; end
      if (!have_p) begin r.p = c; have_p = 1; continue; end
      if (c == r.p) begin r.dups++; continue; end
      r.q = c;
      r.n = r.p * r.q;
      r.phi = (r.p - 1) * (r.q - 1);
      r.e = e_init;
      while (r.e < r.phi && gcd(r.phi, r.e) != 1) begin r.e += 2; r.erej++; end
      if (r.e < r.phi) return r;
      r.restarts++;
      have_p = 0;
    end
  endfunction

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 21; k++) begin
      ref_t r;
      longint unsigned m;
      seed = (k == 0) ? 16'h0000 : 16'($urandom);
      if (k == 19) seed = 16'd5461;   // meets a repeated prime
      if (k == 20) begin
        // make sure one run has to reject e = 17
        seed = 16'd1;
        while (model(seed, 16, 17).erej == 0) seed++;
      end
      r = model(seed, 16, 17);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      check("busy", busy, 1);
      while (!done) @(negedge clk);
      check("key_valid", key_valid, 1);
      check("p", p, r.p);
      check("q", q, r.q);
      check("n", key_n, r.n);
      check("phi", phi, r.phi);
      check("e", key_e, r.e);
      check("composites", composites, r.composites);
      check("dups", dups, r.dups);
      check("e_rejects", e_rejects, r.erej);
      check("restarts", restarts, 0);
      check("p prime", is_prime(p), 1);
      check("q prime", is_prime(q), 1);
      check("e*d mod phi", (longint'(key_e) * longint'(key_d)) % r.phi, 1);
      check("d < phi", key_d < r.phi, 1);
      m = 64'($urandom) % r.n;
      check("round trip", modexp(modexp(m, key_e, r.n), key_d, r.n), m);
      seen_composite += (composites != 0);
      seen_dup       += (dups != 0);
      seen_ereject   += (e_rejects != 0);
    end
    // restart path: 8-bit primes, e starting at SE_INIT
    for (int k = 0; k < 8; k++) begin
      ref_t r;
      seed = 16'($urandom);
      if (k == 7) begin
        // make sure one run has to discard a prime pair
        seed = 16'd1;
        while (model(seed, 8, SE_INIT).restarts == 0) seed++;
      end
      r = model(seed, 8, SE_INIT);
      @(negedge clk);
      s_start = 1;
      @(negedge clk);
      s_start = 0;
      while (!s_done) @(negedge clk);
      check("small p", s_p, r.p);
      check("small q", s_q, r.q);
      check("small e", s_e, r.e);
      check("small restarts", s_rest, r.restarts);
      check("small e*d", (longint'(s_e) * longint'(s_d)) % r.phi, 1);
      seen_restart += (s_rest != 0);
    end
    $display("mechanism count: composite rejected %0d, e rejected %0d, prime pair discarded %0d, repeated prime %0d",
             seen_composite, seen_ereject, seen_restart, seen_dup);
    checks += 4;
    if (seen_dup == 0)       begin failures++; $display("FAIL no repeated prime seen"); end
    if (seen_composite == 0) begin failures++; $display("FAIL no composite candidate seen"); end
    if (seen_ereject == 0)   begin failures++; $display("FAIL no e rejection seen"); end
    if (seen_restart == 0)   begin failures++; $display("FAIL no restart seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
