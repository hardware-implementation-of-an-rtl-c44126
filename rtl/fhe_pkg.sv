// fhe_pkg: widths shared by the integer-FHE encryption, decryption and
// evaluation datapaths.
//
// The ciphertext width (64 bits) and the width of the recovered message
// (25 bits) are the sizes of the ciphertext bus and of the decrypted-message
// output of the reference encryption-decryption system. The widths of the
// key p, the noise r and the constant q are this design's own choice: they
// are sized so that CT = m + 2*r*p + p*q can never exceed the 64-bit
// ciphertext (2^25 + 2^49 + 2^48 < 2^64).
package fhe_pkg;

  localparam int unsigned CT_W = 64;  // ciphertext width
  localparam int unsigned M_W  = 25;  // message / decrypted-result width
  localparam int unsigned P_W  = 32;  // secret key p (a prime, e.g. 1207645633)
  localparam int unsigned R_W  = 16;  // noise r
  localparam int unsigned Q_W  = 16;  // large constant q

  // Latency of the decryption pipeline, input sample to result: one register
  // after the divider and one after the subtractor.
  localparam int unsigned DEC_LATENCY = 2;

endpackage
