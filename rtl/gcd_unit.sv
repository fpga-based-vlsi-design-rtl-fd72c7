// gcd_unit: chooses the public exponent e and computes the private
// exponent d from phi(n).
//
// Candidates e = E_INIT, E_INIT + 2, E_INIT + 4, ... are tried in turn.
// A candidate outside 1 < e < phi ends the search with ok = 0 (the
// caller then needs new primes). For a candidate in range the extended
// Euclidean algorithm runs on (phi, e):
//   (r0, r1) = (phi, e), (t0, t1) = (0, 1)
//   while r1 != 0: q = r0 / r1; (r0, r1) = (r1, r0 - q*r1);
//                  (t0, t1) = (t1, t0 - q*t1)
// r0 ends as gcd(phi, e). If it is 1, e is accepted and d = t0 mod phi,
// so e * d = 1 (mod phi); otherwise the next candidate is tried and
// rejects is incremented. The quotient and remainder come from a
// seq_divmod, the product q*|t1| from an Urdhva multiplier (vedic_mul).
// The t values are kept signed, W + 2 bits wide; |t| never exceeds phi.
//
// Interface: start (pulse, while idle) captures phi; busy is high while
// searching; done pulses once with ok, e, d and rejects valid, and they hold
// until the next start. Timing: each Euclid step takes W + 3 cycles
// (start, divide, update), plus 1 cycle per candidate for the range check.
// E_INIT should be odd: phi is even, so an even e is never accepted.
//
// The document gives the function (gcd test on phi(n) and e, d by
// inverting e modulo phi(n) with the extended Euclidean algorithm) and the
// example phi = 3120, e = 17, d = 2753. Starting at 17 and stepping by 2 is
// this design's choice.
module gcd_unit #(
  parameter int unsigned W      = 32,
  parameter int unsigned E_INIT = 17
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] phi,
  output logic         busy,
  output logic         done,
  output logic         ok,
  output logic [W-1:0] e,
  output logic [W-1:0] d,
  output logic [7:0]   rejects
);
  typedef enum logic [2:0] {S_IDLE, S_RANGE, S_DIV, S_WAIT, S_UPD} state_t;
  state_t state;

  typedef logic signed [W+1:0] coef_t;

  logic [W-1:0] phi_r, e_c, r0, r1;
  coef_t        t0, t1;

  logic         div_busy, div_done;
  logic [W-1:0] div_quo, div_rem;

  logic [W-1:0]   t1_mag;
  logic [2*W-1:0] qt_mag;
  coef_t          qt, t_next;

  seq_divmod #(.NW(W), .DW(W)) u_div (
    .clk, .rst, .start(state == S_DIV), .dividend(r0), .divisor(r1),
    .busy(div_busy), .done(div_done), .quo(div_quo), .rem(div_rem)
  );

  assign t1_mag = W'(t1[W+1] ? -t1 : t1);

  vedic_mul #(.N(W)) u_mul (.a(div_quo), .b(t1_mag), .p(qt_mag));

  always_comb begin
    qt     = t1[W+1] ? -coef_t'(qt_mag[W+1:0]) : coef_t'(qt_mag[W+1:0]);
    t_next = t0 - qt;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      ok      <= 1'b0;
      e       <= '0;
      d       <= '0;
      rejects <= '0;
      phi_r   <= '0;
      e_c     <= '0;
      r0      <= '0;
      r1      <= '0;
      t0      <= '0;
      t1      <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          phi_r   <= phi;
          e_c     <= W'(E_INIT);
          rejects <= '0;
          state   <= S_RANGE;
        end
        S_RANGE: begin
          if (e_c > W'(1) && e_c < phi_r) begin
            r0    <= phi_r;
            r1    <= e_c;
            t0    <= '0;
            t1    <= coef_t'(1);
            state <= S_DIV;
          end else begin
            ok    <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_DIV:  state <= S_WAIT;          // divider started this cycle
        S_WAIT: if (div_done) state <= S_UPD;
        S_UPD: begin
          r0 <= r1;
          r1 <= div_rem;
          t0 <= t1;
          t1 <= t_next;
          if (div_rem != '0) begin
            state <= S_DIV;
          end else if (r1 == W'(1)) begin // gcd(phi, e) = 1
            ok    <= 1'b1;
            e     <= e_c;
            d     <= t1[W+1] ? W'(t1 + coef_t'(phi_r)) : W'(t1);
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin                  // common factor: next candidate
            e_c     <= e_c + W'(2);
            rejects <= rejects + 8'd1;
            state   <= S_RANGE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
