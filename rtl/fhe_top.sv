// fhe_top: the three systems of the enhanced-DGHV integer FHE design side
// by side, each with its own ports, on one clock and reset:
//
//   ed_*   encryption-decryption system  (encrypt m, decrypt it back)
//   add_*  additive evaluation system    (decrypt(CT1 + CT2) = m1 + m2)
//   mul_*  multiplicative evaluation     (decrypt(CT1 * CT2) = m1 * m2)
//
// The reference built each system as a design of its own; they share no
// datapath and are placed together here only so that one top holds all
// of them. Each system answers its inputs two clock cycles later, with its
// own out_valid flag.
module fhe_top
  import fhe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,

  // Encryption-decryption system
  input  logic              ed_in_valid,
  input  logic [M_W-1:0]    ed_m,
  input  logic [R_W-1:0]    ed_r,
  input  logic [P_W-1:0]    ed_p,
  input  logic [Q_W-1:0]    ed_q,
  output logic [CT_W-1:0]   ed_ct,
  output logic              ed_out_valid,
  output logic [M_W-1:0]    ed_m_out,

  // Additive homomorphic evaluation system
  input  logic              add_in_valid,
  input  logic [M_W-1:0]    add_m1,
  input  logic [M_W-1:0]    add_m2,
  input  logic [R_W-1:0]    add_r,
  input  logic [P_W-1:0]    add_p,
  input  logic [Q_W-1:0]    add_q,
  output logic [CT_W-1:0]   add_ct1,
  output logic [CT_W-1:0]   add_ct2,
  output logic [CT_W:0]     add_ct_sum,
  output logic [M_W:0]      add_plain_sum,
  output logic              add_out_valid,
  output logic [M_W-1:0]    add_m_out,

  // Multiplicative homomorphic evaluation system
  input  logic              mul_in_valid,
  input  logic [M_W-1:0]    mul_m1,
  input  logic [M_W-1:0]    mul_m2,
  input  logic [R_W-1:0]    mul_r,
  input  logic [P_W-1:0]    mul_p,
  input  logic [Q_W-1:0]    mul_q,
  output logic [CT_W-1:0]   mul_ct1,
  output logic [CT_W-1:0]   mul_ct2,
  output logic [2*CT_W-1:0] mul_ct_prod,
  output logic [2*M_W-1:0]  mul_plain_prod,
  output logic              mul_out_valid,
  output logic [M_W-1:0]    mul_m_out
);

  fhe_encdec_system u_encdec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ed_in_valid),
    .m         (ed_m),
    .r         (ed_r),
    .p         (ed_p),
    .q         (ed_q),
    .ct        (ed_ct),
    .out_valid (ed_out_valid),
    .m_out     (ed_m_out)
  );

  fhe_add_eval u_add_eval (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (add_in_valid),
    .m1        (add_m1),
    .m2        (add_m2),
    .r         (add_r),
    .p         (add_p),
    .q         (add_q),
    .ct1       (add_ct1),
    .ct2       (add_ct2),
    .ct_sum    (add_ct_sum),
    .plain_sum (add_plain_sum),
    .out_valid (add_out_valid),
    .m_out     (add_m_out)
  );

  fhe_mul_eval u_mul_eval (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (mul_in_valid),
    .m1         (mul_m1),
    .m2         (mul_m2),
    .r          (mul_r),
    .p          (mul_p),
    .q          (mul_q),
    .ct1        (mul_ct1),
    .ct2        (mul_ct2),
    .ct_prod    (mul_ct_prod),
    .plain_prod (mul_plain_prod),
    .out_valid  (mul_out_valid),
    .m_out      (mul_m_out)
  );

endmodule
