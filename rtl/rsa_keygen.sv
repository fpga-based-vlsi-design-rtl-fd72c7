// rsa_keygen: RSA key generation, from random numbers to the key
// registers n, e and d.
//
// A controller strings the key generation blocks together:
//   prng             draws a 16-bit pseudo random number; the low PRIME_W
//                    bits, with the top and bottom bit forced to 1, form an
//                    odd candidate of full width;
//   primality_tester checks the candidate; composites are dropped and a new
//                    number is drawn;
//   confirmed_primes keeps two distinct primes p, q and forms n = p*q and
//                    phi = (p-1)*(q-1);
//   gcd_unit         picks e with gcd(phi, e) = 1 and d = e^-1 mod phi;
// and n, e and d are then loaded into the key registers. Should no e fit
// (phi too small), both primes are discarded and the search starts over.
//
// Interface: start (pulse, while idle) loads seed into the generator (zero
// selects the generator's built-in seed) and begins; busy is high while
// working; done pulses when key_n, key_e, key_d, p, q and phi are loaded,
// and key_valid then stays high until the next start. composites, dups,
// e_rejects and restarts count, for the last run, the candidates found
// composite, repeated primes, rejected e candidates and prime pairs
// discarded. Timing depends on the random numbers: at PRIME_W = 16 a key
// took between 3 700 and 12 400 cycles, about 6 000 on average, over 40
// seeds; most of it is trial division of the prime candidates.
//
// The document gives the chain of blocks and what each does, and that n, e
// and d are held in registers; forcing the candidate's top and bottom bits,
// the restart rule and the counters are this design's choice.
module rsa_keygen #(
  parameter int unsigned PRIME_W = rsa_pkg::PRIME_W,
  parameter int unsigned E_INIT  = rsa_pkg::E_INIT,
  parameter int unsigned KEY_W   = 2 * PRIME_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [15:0]        seed,
  output logic               busy,
  output logic               done,
  output logic               key_valid,
  output logic [KEY_W-1:0]   key_n,
  output logic [KEY_W-1:0]   key_e,
  output logic [KEY_W-1:0]   key_d,
  output logic [PRIME_W-1:0] p,
  output logic [PRIME_W-1:0] q,
  output logic [KEY_W-1:0]   phi,
  output logic [15:0]        composites,
  output logic [7:0]         dups,
  output logic [7:0]         e_rejects,
  output logic [7:0]         restarts
);
  initial assert (PRIME_W >= 8 && PRIME_W <= 16 && PRIME_W % 8 == 0)
    else $error("rsa_keygen: PRIME_W must be 8 or 16");

  typedef enum logic [2:0] {S_IDLE, S_DRAW, S_TEST, S_PWAIT, S_PNEXT, S_NWAIT, S_GWAIT} state_t;
  state_t state;

  logic [15:0]        rnd;
  logic [PRIME_W-1:0] cand, cand_next;
  logic               pt_busy, pt_done, pt_prime;
  logic               cp_clear, cp_need, cp_dup, cp_valid, prime_valid;
  logic [KEY_W-1:0]   cp_n;
  logic               gcd_busy, gcd_done, gcd_ok;
  logic [KEY_W-1:0]   gcd_e, gcd_d;
  logic [7:0]         gcd_rejects;

  prng u_prng (
    .clk, .rst, .load(state == S_IDLE && start), .seed,
    .step(state == S_DRAW), .value(rnd)
  );

  assign cand_next = {1'b1, rnd[PRIME_W-2:1], 1'b1};

  primality_tester #(.W(PRIME_W)) u_prime (
    .clk, .rst, .start(state == S_TEST), .cand(cand_next),
    .busy(pt_busy), .done(pt_done), .is_prime(pt_prime)
  );

  assign prime_valid = (state == S_PWAIT) && pt_done && pt_prime;

  confirmed_primes #(.W(PRIME_W)) u_pair (
    .clk, .rst, .clear(cp_clear), .prime_valid, .prime_in(cand),
    .need(cp_need), .dup(cp_dup), .valid(cp_valid), .p, .q, .n(cp_n), .phi
  );

  gcd_unit #(.W(KEY_W), .E_INIT(E_INIT)) u_gcd (
    .clk, .rst, .start(state == S_NWAIT && cp_valid), .phi,
    .busy(gcd_busy), .done(gcd_done), .ok(gcd_ok), .e(gcd_e), .d(gcd_d),
    .rejects(gcd_rejects)
  );

  assign cp_clear = (state == S_IDLE && start) || (state == S_GWAIT && gcd_done && !gcd_ok);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      key_valid  <= 1'b0;
      key_n      <= '0;
      key_e      <= '0;
      key_d      <= '0;
      cand       <= '0;
      composites <= '0;
      dups       <= '0;
      e_rejects  <= '0;
      restarts   <= '0;
    end else begin
      done <= 1'b0;
      if (cp_dup) dups <= dups + 8'd1;
      unique case (state)
        S_IDLE: if (start) begin
          key_valid  <= 1'b0;
          composites <= '0;
          dups       <= '0;
          e_rejects  <= '0;
          restarts   <= '0;
          state      <= S_DRAW;
        end
        S_DRAW: state <= S_TEST;          // generator advances this cycle
        S_TEST: begin
          cand  <= cand_next;
          state <= S_PWAIT;
        end
        S_PWAIT: if (pt_done) begin
          if (pt_prime) begin
            state <= S_PNEXT;
          end else begin
            composites <= composites + 16'd1;
            state      <= S_DRAW;
          end
        end
        S_PNEXT: state <= cp_need ? S_DRAW : S_NWAIT;
        S_NWAIT: if (cp_valid) state <= S_GWAIT;
        S_GWAIT: if (gcd_done) begin
          e_rejects <= e_rejects + gcd_rejects;
          if (gcd_ok) begin
            key_n     <= cp_n;
            key_e     <= gcd_e;
            key_d     <= gcd_d;
            key_valid <= 1'b1;
            done      <= 1'b1;
            state     <= S_IDLE;
          end else begin
            restarts <= restarts + 8'd1;
            state    <= S_DRAW;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
