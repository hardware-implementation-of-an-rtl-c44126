// fhe_encdec_system: the encryption-decryption system. A message m is
// encrypted with key p, noise r and constant q into a 64-bit ciphertext,
// and the ciphertext is immediately decrypted with the same key, so m_out
// must equal m. It demonstrates that CT mod p recovers the message.
//
// Structure, as in the reference system: the encryption datapath feeds its
// ciphertext to the decryption datapath, and p is shared by both. The
// reference fed m, r, p and q from constant sources inside the design and
// exported only the clock and the 25-bit result; here they are input ports,
// and the ciphertext is brought out as well, so that one instance can be
// driven with any values.
//
// Timing: encryption is combinational; decryption has two register stages,
// so m_out answers the inputs of two cycles earlier, flagged by out_valid.
module fhe_encdec_system
  import fhe_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [M_W-1:0]   m,
  input  logic [R_W-1:0]   r,
  input  logic [P_W-1:0]   p,
  input  logic [Q_W-1:0]   q,
  output logic [CT_W-1:0]  ct,        // ciphertext (combinational)
  output logic             out_valid,
  output logic [M_W-1:0]   m_out      // decrypted message
);

  fhe_encrypt u_encryption (
    .m  (m),
    .r  (r),
    .p  (p),
    .q  (q),
    .ct (ct)
  );

  fhe_decrypt #(.CW(CT_W)) u_decryption (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .c         (ct),
    .p         (p),
    .out_valid (out_valid),
    .m         (m_out)
  );

endmodule
