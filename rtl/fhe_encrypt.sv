// fhe_encrypt: symmetric encryption of one whole message word with the
// enhanced DGHV scheme over the integers,
//
//     CT = m + 2*r*p + p*q
//
// where p is the secret prime key, r a random noise value and q a large
// constant. Unlike bit-wise DGHV, m is a complete character or number in
// [0, p-1], so one ciphertext carries one message word.
//
// Structure (as in the reference datapath): one multiplier forms r*p, a
// constant multiplier doubles it, a second multiplier forms p*q, one adder
// sums the two products and a last adder adds m. The datapath is purely
// combinational, matching the reference subsystem, whose blocks carry no
// delay; the surrounding system registers the result further downstream.
//
// Ports: m, r, p, q in; ct out (CT_W bits). The arithmetic is exact integer
// arithmetic; the reference computed with floating-point cores, which is
// not followed here. All widths are parameters; with the package defaults
// the sum cannot overflow CT_W bits: it needs at most 51, so the top 13
// bits of ct are always zero and are kept only to give the ciphertext the
// 64-bit width of the original design. With other widths the result is
// taken modulo 2^CTW.
module fhe_encrypt
  import fhe_pkg::*;
#(
  parameter int unsigned MW  = M_W,
  parameter int unsigned PW  = P_W,
  parameter int unsigned RW  = R_W,
  parameter int unsigned QW  = Q_W,
  parameter int unsigned CTW = CT_W
) (
  input  logic [MW-1:0]  m,   // plaintext word
  input  logic [RW-1:0]  r,   // noise
  input  logic [PW-1:0]  p,   // secret key
  input  logic [QW-1:0]  q,   // large constant
  output logic [CTW-1:0] ct   // ciphertext
);

  // Full-precision intermediate width: the larger product plus two carry bits.
  localparam int unsigned XW = ((RW > QW) ? RW : QW) + PW + 2;

  logic [RW+PW-1:0] rp;      // Mult:  r * p
  logic [RW+PW:0]   rp2;     // CMult: 2 * r * p
  logic [QW+PW-1:0] pq;      // Mult1: p * q
  logic [XW-1:0]    noise;   // AddSub1: 2rp + pq
  logic [XW:0]      sum;     // AddSub:  m + 2rp + pq

  always_comb begin
    rp    = r * p;
    rp2   = {rp, 1'b0};
    pq    = p * q;
    noise = XW'(rp2) + XW'(pq);
    sum   = (XW+1)'(noise) + (XW+1)'(m);
    ct    = CTW'(sum);
  end

endmodule
