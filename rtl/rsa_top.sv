// rsa_top: RSA cryptosystem on one chip: key generation and the RSA
// encryption / decryption core, with Urdhva (Vedic) multipliers throughout.
//
// rsa_keygen turns pseudo random numbers into two primes and the key set
// n, e, d. rsa_core raises a data word to an exponent modulo a modulus.
// A key selector sits between them: with use_gen_key low the core takes its
// exponent and modulus from the inexp and inmod pins (any externally
// supplied key); with use_gen_key high it takes the generated modulus and
// either the public exponent e (decrypt low: encryption, C = M^e mod n) or
// the private exponent d (decrypt high: decryption, M = C^d mod n).
//
// Interface: kg_start (pulse) starts key generation from kg_seed;
// kg_done pulses and key_valid rises when key_n, key_e and key_d are
// loaded. ds (pulse, while ready is high) starts the core on indata with
// the selected key; ready returns high with cypher valid. The key selector
// is combinational and is sampled by the core at ds. Timing is that of the
// two blocks (see rsa_keygen and rsa_core).
//
// The split into key generation and core, and encryption followed by
// decryption with the generated keys, follow the document; the selector
// inputs use_gen_key and decrypt are this design's choice.
module rsa_top #(
  parameter int unsigned PRIME_W = rsa_pkg::PRIME_W,
  parameter int unsigned KEY_W   = 2 * PRIME_W
) (
  input  logic             clk,
  input  logic             rst,
  // key generation
  input  logic             kg_start,
  input  logic [15:0]      kg_seed,
  output logic             kg_done,
  output logic             key_valid,
  output logic [KEY_W-1:0] key_n,
  output logic [KEY_W-1:0] key_e,
  output logic [KEY_W-1:0] key_d,
  // key selection
  input  logic             use_gen_key,
  input  logic             decrypt,
  // RSA core
  input  logic             ds,
  input  logic [KEY_W-1:0] indata,
  input  logic [KEY_W-1:0] inexp,
  input  logic [KEY_W-1:0] inmod,
  output logic [KEY_W-1:0] cypher,
  output logic             ready
);
  logic               kg_busy;
  logic [PRIME_W-1:0] kg_p, kg_q;
  logic [KEY_W-1:0]   kg_phi;
  logic [15:0]        kg_composites;
  logic [7:0]         kg_dups, kg_e_rejects, kg_restarts;
  logic [KEY_W-1:0]   core_exp, core_mod;

  rsa_keygen #(.PRIME_W(PRIME_W), .KEY_W(KEY_W)) u_keygen (
    .clk, .rst, .start(kg_start), .seed(kg_seed),
    .busy(kg_busy), .done(kg_done), .key_valid,
    .key_n, .key_e, .key_d, .p(kg_p), .q(kg_q), .phi(kg_phi),
    .composites(kg_composites), .dups(kg_dups),
    .e_rejects(kg_e_rejects), .restarts(kg_restarts)
  );

  always_comb begin
    if (use_gen_key) begin
      core_exp = decrypt ? key_d : key_e;
      core_mod = key_n;
    end else begin
      core_exp = inexp;
      core_mod = inmod;
    end
  end

  rsa_core #(.W(KEY_W)) u_core (
    .clk, .rst, .ds, .indata, .inexp(core_exp), .inmod(core_mod),
    .cypher, .ready
  );
endmodule
