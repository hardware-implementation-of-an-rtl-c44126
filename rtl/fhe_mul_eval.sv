// fhe_mul_eval: multiplicative homomorphic evaluation system. Two
// messages m1 and m2 are encrypted under the same key p, noise r and
// constant q; the two ciphertexts are multiplied and the product is
// decrypted. Every term of CT1*CT2 except m1*m2 is a multiple of p, so
// the decrypted product equals m1 * m2 as long as m1 * m2 < p. For
// comparison the plaintexts are also multiplied directly (plain_prod).
//
// Structure, as in the reference system: two encryption datapaths sharing
// r, p and q, one ciphertext multiplier, one decryption datapath and one
// plaintext multiplier. The reference carried the product in a 64-bit
// floating-point word; here it is kept exact on 2*CT_W bits, so that
// ciphertexts of any size the encryptor produces can be multiplied without
// loss, and the decryptor is instantiated at that width. Inputs are ports
// here rather than constants.
//
// Timing: encryption and the multipliers are combinational; m_out follows
// the inputs two cycles later, flagged by out_valid.
module fhe_mul_eval
  import fhe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [M_W-1:0]    m1,
  input  logic [M_W-1:0]    m2,
  input  logic [R_W-1:0]    r,
  input  logic [P_W-1:0]    p,
  input  logic [Q_W-1:0]    q,
  output logic [CT_W-1:0]   ct1,
  output logic [CT_W-1:0]   ct2,
  output logic [2*CT_W-1:0] ct_prod,    // CT1 * CT2
  output logic [2*M_W-1:0]  plain_prod, // m1 * m2, computed in the clear
  output logic              out_valid,
  output logic [M_W-1:0]    m_out       // decrypted CT1 * CT2
);

  fhe_encrypt u_encryption (
    .m(m1), .r(r), .p(p), .q(q), .ct(ct1)
  );

  fhe_encrypt u_encryption1 (
    .m(m2), .r(r), .p(p), .q(q), .ct(ct2)
  );

  always_comb begin
    ct_prod    = (2*CT_W)'(ct1) * (2*CT_W)'(ct2);
    plain_prod = (2*M_W)'(m1) * (2*M_W)'(m2);
  end

  fhe_decrypt #(.CW(2 * CT_W)) u_decryption (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .c         (ct_prod),
    .p         (p),
    .out_valid (out_valid),
    .m         (m_out)
  );

endmodule
