// vedic_mul: NxN unsigned multiplier by Urdhva Tiryakbhyam, built from
// 4x4 cells.
//
// Both operands are cut into D = N/4 four-bit digits. Every digit pair
// (a_i, b_j) is multiplied at once by a vedic_mul4 cell. The sutra is then
// applied one level up, in radix 16: column k collects the vertical and
// crosswise digit products with i + j = k, adds the carry left by column
// k-1, keeps the low four bits as product digit k and passes the rest on as
// the carry into column k+1. The last carry is the top product digit. With
// N = 8 this is the 8x8 "utm8" multiplier; the RSA core uses N = 32 and the
// key generator N = 16.
//
// Decomposing into 4x4 cells and the column-with-carry rule follow the
// Urdhva method; the radix-16 column adder written as a plain sum is this
// design's choice.
//
// Interface: a, b (N bits) in, p (2N bits) out. Purely combinational.
// N must be a positive multiple of 4.
module vedic_mul #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned D  = N / 4;
  // a column holds up to D products of 8 bits plus the incoming carry
  localparam int unsigned CW = 10 + $clog2(D + 1);

  initial assert (N % 4 == 0 && N > 0) else $error("vedic_mul: N must be a multiple of 4");

  logic [7:0]    pp  [D][D];  // digit products from the 4x4 cells
  logic [CW-1:0] col [2*D-1];
  logic [CW-1:0] cry [2*D];

  for (genvar i = 0; i < D; i++) begin : g_row
    for (genvar j = 0; j < D; j++) begin : g_col
      vedic_mul4 u_cell (.a(a[4*i +: 4]), .b(b[4*j +: 4]), .p(pp[i][j]));
    end
  end

  always_comb begin
    cry[0] = '0;
    for (int k = 0; k < 2*D-1; k++) begin
      col[k] = cry[k];
      for (int i = 0; i < D; i++) begin
        if (k - i >= 0 && k - i < D) col[k] = col[k] + CW'(pp[i][k-i]);
      end
      p[4*k +: 4] = col[k][3:0];
      cry[k+1]    = col[k] >> 4;
    end
    p[2*N-1 -: 4] = cry[2*D-1][3:0];
  end
endmodule
