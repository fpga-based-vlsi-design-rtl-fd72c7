// vedic_mul4: 4x4 unsigned multiplier by Urdhva Tiryakbhyam
// ("vertically and crosswise").
//
// The product is formed column by column in one pass, the way the sutra
// multiplies decimal numbers: for column k every pair of bits a[i], b[j]
// with i + j = k is multiplied (one vertical product for the outer columns,
// crosswise products for the inner ones), the products are added to the
// carry from column k-1, the least significant bit of the sum becomes
// product bit k and the rest is the carry into column k+1. Column 6's carry
// is product bit 7. No partial product is shifted.
//
// Interface: a, b (4 bits each) in, p (8 bits) out. Purely combinational.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  // column sum: at most 4 bit products plus a carry of at most 2
  logic [2:0] col  [7];
  logic [1:0] cry  [8];

  always_comb begin
    cry[0] = '0;
    for (int k = 0; k < 7; k++) begin
      col[k] = 3'(cry[k]);
      for (int i = 0; i < 4; i++) begin
        if (k - i >= 0 && k - i < 4) col[k] = col[k] + 3'(a[i] & b[k-i]);
      end
      p[k]     = col[k][0];
      cry[k+1] = col[k][2:1];
    end
    p[7] = cry[7][0];
  end
endmodule
