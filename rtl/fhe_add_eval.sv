// fhe_add_eval: additive homomorphic evaluation system. Two messages m1
// and m2 are encrypted under the same key p, noise r and constant q; the
// two ciphertexts are added and the sum is decrypted. Because
//
//     CT1 + CT2 = (m1 + m2) + 2(r1 + r2)p + 2pq,
//
// the decrypted sum equals m1 + m2 as long as m1 + m2 < p. For comparison
// the plaintexts are also added directly (plain_sum), so that the two
// results can be checked against each other.
//
// Structure, as in the reference system: two encryption datapaths sharing
// r, p and q, one ciphertext adder, one decryption datapath and one
// plaintext adder. The ciphertext sum is one bit wider than a ciphertext
// so that it cannot wrap. Inputs are ports here rather than constants.
//
// Timing: encryption and the adders are combinational; m_out follows the
// inputs two cycles later, flagged by out_valid.
module fhe_add_eval
  import fhe_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [M_W-1:0]   m1,
  input  logic [M_W-1:0]   m2,
  input  logic [R_W-1:0]   r,
  input  logic [P_W-1:0]   p,
  input  logic [Q_W-1:0]   q,
  output logic [CT_W-1:0]  ct1,
  output logic [CT_W-1:0]  ct2,
  output logic [CT_W:0]    ct_sum,     // CT1 + CT2
  output logic [M_W:0]     plain_sum,  // m1 + m2, computed in the clear
  output logic             out_valid,
  output logic [M_W-1:0]   m_out       // decrypted CT1 + CT2
);

  fhe_encrypt u_encryption (
    .m(m1), .r(r), .p(p), .q(q), .ct(ct1)
  );

  fhe_encrypt u_encryption1 (
    .m(m2), .r(r), .p(p), .q(q), .ct(ct2)
  );

  always_comb begin
    ct_sum    = (CT_W+1)'(ct1) + (CT_W+1)'(ct2);
    plain_sum = (M_W+1)'(m1) + (M_W+1)'(m2);
  end

  fhe_decrypt #(.CW(CT_W + 1)) u_decryption (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .c         (ct_sum),
    .p         (p),
    .out_valid (out_valid),
    .m         (m_out)
  );

endmodule
