// fhe_decrypt: decryption of an integer-FHE ciphertext, m = C mod p.
//
// The remainder is formed as in the reference datapath,
//
//     m = C - p * floor(C / p)
//
// by a divider, a multiplier and a subtractor. The reference worked in
// floating point and extracted the fractional part of C/p with two casts
// before multiplying it back by p; here the same equation is evaluated in
// exact integer arithmetic: the divider delivers floor(C/p) directly, and
// the product p*floor(C/p) is subtracted from C.
//
// Timing: two register stages, as the reference has one delay after the
// divider and one after the subtractor. Stage 1 registers the quotient
// together with copies of C and p (so that p may change every cycle);
// stage 2 registers the remainder. A sample presented with in_valid in
// cycle n appears on m with out_valid in cycle n+2; a new sample may be
// presented every cycle. in_valid/out_valid and the reset of the valid
// flags are this design's own additions.
//
// C is CW bits wide (64 for a fresh ciphertext, 65 after a homomorphic
// addition, 128 after a homomorphic multiplication). The remainder is
// narrower than p and is output on MW bits, the reference's 25-bit result,
// so results of 2^MW or more are cut to their low MW bits. p = 0 is not a
// key; it yields quotient 0 and m = C truncated instead of a division by
// zero.
module fhe_decrypt
  import fhe_pkg::*;
#(
  parameter int unsigned CW = CT_W,
  parameter int unsigned PW = P_W,
  parameter int unsigned MW = M_W
) (
  input  logic          clk,
  input  logic          rst_n,      // asynchronous, active low
  input  logic          in_valid,
  input  logic [CW-1:0] c,          // ciphertext
  input  logic [PW-1:0] p,          // secret key
  output logic          out_valid,
  output logic [MW-1:0] m           // recovered message
);

  // Stage 1: divider (Divide2 with its delay).
  logic [CW-1:0] quot_d;
  logic [CW-1:0] c_d;
  logic [PW-1:0] p_d;
  logic          v_d;

  logic [CW-1:0] quot;
  always_comb begin
    if (p == '0) quot = '0;
    else         quot = c / CW'(p);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_d <= 1'b0;
    else        v_d <= in_valid;
  end

  always_ff @(posedge clk) begin
    quot_d <= quot;
    c_d    <= c;
    p_d    <= p;
  end

  // Stage 2: multiplier and subtractor (Mult2, AddSub2 with its delay).
  logic [CW-1:0] back;      // p * floor(C/p), never above C
  logic [MW-1:0] rem;       // C mod p (below p), cut to MW bits
  always_comb begin
    back = quot_d * CW'(p_d);
    rem  = MW'(c_d - back);   // Convert2: cast to the output width
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_d;
  end

  always_ff @(posedge clk) begin
    m <= rem;
  end

endmodule
