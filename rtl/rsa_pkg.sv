// rsa_pkg: widths shared by the RSA key generator and the RSA core.
//
// The key generator draws 16-bit pseudo random numbers and turns two of
// them into 16-bit primes, so the modulus n = p*q and every key value fit in
// 32 bits. The RSA core's data, exponent and modulus ports are 32 bits wide,
// matching the eight-hex-digit values on the core's simulation traces.
// The 16-bit random numbers and e = 17 come from the published design; the
// constants are gathered here so that every block shares them.
package rsa_pkg;
  localparam int unsigned PRIME_W = 16;          // width of p and q
  localparam int unsigned KEY_W   = 2 * PRIME_W; // width of n, phi, e, d, data
  localparam int unsigned E_INIT  = 17;          // first public exponent tried
endpackage
