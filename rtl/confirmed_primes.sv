// confirmed_primes: keeps the first two distinct primes it is offered and
// turns them into the modulus and its totient.
//
// The first prime offered after clear becomes p, the next one that differs
// from p becomes q (an equal one is dropped, since RSA needs p != q, and
// dup pulses). Once q is held, two Urdhva multipliers (vedic_mul, W bits)
// form n = p * q and phi = (p - 1) * (q - 1), which are registered in the
// following cycle, when valid rises. Further primes are ignored until clear.
//
// Interface: prime_valid qualifies prime_in (one cycle each); need is high
// while fewer than two primes are held; valid stays high with p, q, n, phi
// until clear. Latency: valid rises two clocks after the second prime is
// offered.
//
// The document gives this block's function (pull out two primes, compute n
// and phi(n)); the registers, the duplicate rule and the timing are this
// design's choice.
module confirmed_primes #(
  parameter int unsigned W = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           clear,
  input  logic           prime_valid,
  input  logic [W-1:0]   prime_in,
  output logic           need,
  output logic           dup,
  output logic           valid,
  output logic [W-1:0]   p,
  output logic [W-1:0]   q,
  output logic [2*W-1:0] n,
  output logic [2*W-1:0] phi
);
  logic           have_p, have_q;
  logic [2*W-1:0] n_c, phi_c;

  vedic_mul #(.N(W)) u_mul_n   (.a(p),        .b(q),        .p(n_c));
  vedic_mul #(.N(W)) u_mul_phi (.a(p - W'(1)), .b(q - W'(1)), .p(phi_c));

  assign need = !have_q;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      have_p <= 1'b0;
      have_q <= 1'b0;
      valid  <= 1'b0;
      dup    <= 1'b0;
      p      <= '0;
      q      <= '0;
      n      <= '0;
      phi    <= '0;
    end else begin
      dup <= 1'b0;
      if (prime_valid && !have_p) begin
        p      <= prime_in;
        have_p <= 1'b1;
      end else if (prime_valid && !have_q) begin
        if (prime_in == p) begin
          dup <= 1'b1;
        end else begin
          q      <= prime_in;
          have_q <= 1'b1;
        end
      end
      if (have_q && !valid) begin
        n     <= n_c;
        phi   <= phi_c;
        valid <= 1'b1;
      end
    end
  end
endmodule
