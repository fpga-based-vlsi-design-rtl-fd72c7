// primality_tester: decides whether a W-bit number is prime.
//
// Trial division: 0 and 1 are not prime, 2 and 3 are, other even numbers
// are not. An odd x is then divided by 3, 5, 7, ... in turn; a zero
// remainder proves it composite. The search stops with "prime" as soon as
// the divisor squared exceeds x, or once the largest odd W/2-bit divisor
// has been tried (its successor squared is already above 2^W). The square
// is formed by an Urdhva (vedic_mul) multiplier of W/2 bits, the 8x8 one at
// the default W = 16, and each remainder by a seq_divmod.
//
// Interface: start (pulse, while idle) captures cand; busy is high while
// testing; done pulses for one cycle with is_prime valid, which holds until
// the next start. Timing: one cycle per divisor to compare its square, then
// W + 1 cycles for the division; a prime near 2^16 takes about
// 128 * 18 = 2300 cycles, an even number 1 cycle.
//
// The document names the primality tester and its input (a 16-bit random
// number) but not its method; trial division is this design's choice.
module primality_tester #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] cand,
  output logic         busy,
  output logic         done,
  output logic         is_prime
);
  localparam int unsigned H = W / 2;

  initial assert (W % 8 == 0 && W > 0) else $error("primality_tester: W must be a multiple of 8");

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_DIV} state_t;
  state_t state;

  logic [W-1:0] x;
  logic [H-1:0] dv;
  logic [W-1:0] sq;

  logic         div_start, div_busy, div_done;
  logic [W-1:0] div_quo;
  logic [H-1:0] div_rem;

  vedic_mul #(.N(H)) u_square (.a(dv), .b(dv), .p(sq));

  seq_divmod #(.NW(W), .DW(H)) u_div (
    .clk, .rst, .start(div_start), .dividend(x), .divisor(dv),
    .busy(div_busy), .done(div_done), .quo(div_quo), .rem(div_rem)
  );

  assign div_start = (state == S_CHECK) && (sq <= x);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      is_prime <= 1'b0;
      x        <= '0;
      dv       <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          x  <= cand;
          dv <= H'(3);
          if (cand < W'(2)) begin
            is_prime <= 1'b0;
            done     <= 1'b1;
          end else if (cand < W'(4)) begin
            is_prime <= 1'b1;
            done     <= 1'b1;
          end else if (!cand[0]) begin
            is_prime <= 1'b0;
            done     <= 1'b1;
          end else begin
            state <= S_CHECK;
          end
        end
        S_CHECK: begin
          if (sq > x) begin
            is_prime <= 1'b1;
            done     <= 1'b1;
            state    <= S_IDLE;
          end else begin
            state <= S_DIV;
          end
        end
        S_DIV: if (div_done) begin
          if (div_rem == '0) begin
            is_prime <= 1'b0;
            done     <= 1'b1;
            state    <= S_IDLE;
          end else if (dv == '1) begin
            is_prime <= 1'b1;
            done     <= 1'b1;
            state    <= S_IDLE;
          end else begin
            dv    <= dv + H'(2);
            state <= S_CHECK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
