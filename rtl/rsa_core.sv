// rsa_core: RSA encryption / decryption engine, cypher = indata^inexp mod inmod.
//
// Encryption (data M, public key e, n) and decryption (data C, private key
// d, n) are the same modular exponentiation, so one engine serves both.
// It runs the right-to-left binary method: the data is first reduced mod n
// to give the base; then, for each exponent bit from the least significant
// up, the result is multiplied by the base when the bit is 1, and the base
// is squared while higher exponent bits remain. The loop ends as soon as
// the remaining exponent is zero. Every modular multiplication is one pass
// through a W x W Urdhva multiplier (vedic_mul, combinational) whose 2W-bit
// product is reduced mod n by a seq_divmod.
//
// Interface: ds (data start, one-cycle pulse while ready) captures indata,
// inexp and inmod; ready is low while the engine works and high again,
// with cypher valid, once it has finished. cypher holds its value until the
// next ds. With the defaults the ports are 4 x 32 data bits plus clk, rst,
// ds and ready.
// Timing: every modular multiplication occupies 2W + 3 cycles (one to
// start the reduction, 2W + 1 in the divider, one to choose the next
// step). With h the number of set exponent bits and k the index of the
// highest one, 1 + h + k multiplications are made and ds to ready takes
// (1 + h + k) * (2W + 3) + 1 cycles, counting the cycle in which ds is high
// (exponent 0x11: k = 4, h = 2, so 7 * 67 + 1 = 470 cycles at W = 32).
//
// The document gives the function, the port names indata, inexp, inmod,
// cypher, clk and ds, their 32-bit width and the use of the Vedic
// multiplier. The binary method, the restoring reduction, ready and rst are
// this design's choice. inmod must be non-zero; data >= inmod is reduced
// first, and inmod = 1 gives 0.
module rsa_core #(
  parameter int unsigned W = rsa_pkg::KEY_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ds,
  input  logic [W-1:0] indata,
  input  logic [W-1:0] inexp,
  input  logic [W-1:0] inmod,
  output logic [W-1:0] cypher,
  output logic         ready
);
  typedef enum logic [1:0] {S_IDLE, S_MUL, S_WAIT, S_NEXT} state_t;
  typedef enum logic [1:0] {OP_REDUCE, OP_RES, OP_SQR} op_t;

  state_t state;
  op_t    op;

  logic [W-1:0] exp_r, mod_r, base, res;
  logic         bit_done;   // the multiply for exponent bit 0 has been made

  logic [W-1:0]   opa, opb;
  logic [2*W-1:0] prod;

  logic         div_busy, div_done;
  logic [2*W-1:0] div_quo;
  logic [W-1:0] div_rem;

  always_comb begin
    unique case (op)
      OP_REDUCE: begin opa = base; opb = W'(1); end
      OP_RES:    begin opa = res;  opb = base;  end
      default:   begin opa = base; opb = base;  end
    endcase
  end

  vedic_mul #(.N(W)) u_mul (.a(opa), .b(opb), .p(prod));

  seq_divmod #(.NW(2*W), .DW(W)) u_reduce (
    .clk, .rst, .start(state == S_MUL), .dividend(prod), .divisor(mod_r),
    .busy(div_busy), .done(div_done), .quo(div_quo), .rem(div_rem)
  );

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      op       <= OP_REDUCE;
      exp_r    <= '0;
      mod_r    <= '0;
      base     <= '0;
      res      <= '0;
      bit_done <= 1'b0;
      cypher   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ds) begin
          exp_r    <= inexp;
          mod_r    <= inmod;
          base     <= indata;
          res      <= (inmod == W'(1)) ? '0 : W'(1);
          bit_done <= 1'b0;
          op       <= OP_REDUCE;
          state    <= S_MUL;
        end
        S_MUL:  state <= S_WAIT;        // reduction started this cycle
        S_WAIT: if (div_done) begin
          unique case (op)
            OP_REDUCE: base <= div_rem;
            OP_RES: begin
              res      <= div_rem;
              bit_done <= 1'b1;
            end
            default: begin
              base     <= div_rem;
              exp_r    <= exp_r >> 1;
              bit_done <= 1'b0;
            end
          endcase
          state <= S_NEXT;
        end
        S_NEXT: begin
          if (exp_r == '0) begin
            cypher <= res;
            state  <= S_IDLE;
          end else if (exp_r[0] && !bit_done) begin
            op    <= OP_RES;
            state <= S_MUL;
          end else if (exp_r[W-1:1] == '0) begin
            cypher <= res;               // no higher bit: skip the last square
            state  <= S_IDLE;
          end else begin
            op    <= OP_SQR;
            state <= S_MUL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
