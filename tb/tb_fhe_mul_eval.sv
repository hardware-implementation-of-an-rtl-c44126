// tb_fhe_mul_eval: self-checking test of the multiplicative homomorphic
// evaluation system. Each sample's decrypted ciphertext product must equal
// (m1 * m2) mod p, computed here from the plaintexts alone, two cycles
// later with out_valid. The combinational outputs are checked too: both
// ciphertexts against m + p*(2r + q), their 128-bit product, and the
// plaintext product. The first sample is the worked example (key 9321,
// q = 31, r = 13, m1 = 60, m2 = 65: CT1 = 531357, CT2 = 531362, product
// 282342918234, result 3900); the second multiplies the ciphertexts of
// the 1207645633-key example, whose product needs more than 64 bits. The
// rest are random, with random gaps; many have m1 * m2 >= p, where the
// result wraps mod p.
module tb_fhe_mul_eval;
  import fhe_pkg::*;

  localparam int unsigned LAT = DEC_LATENCY;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            in_valid = 1'b0;
  logic [M_W-1:0]  m1 = '0;
  logic [M_W-1:0]  m2 = '0;
  logic [R_W-1:0]  r = '0;
  logic [P_W-1:0]  p = 1;
  logic [Q_W-1:0]  q = '0;
  logic [CT_W-1:0] ct1, ct2;
  logic [2*CT_W-1:0] ct_prod;
  logic [2*M_W-1:0]  plain_prod;
  logic            out_valid;
  logic [M_W-1:0]  m_out;

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    logic [M_W-1:0] m;
    int             stamp;
  } exp_t;
  exp_t exp_q[$];

  fhe_mul_eval dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .m1(m1), .m2(m2), .r(r), .p(p), .q(q),
    .ct1(ct1), .ct2(ct2), .ct_prod(ct_prod), .plain_prod(plain_prod),
    .out_valid(out_valid), .m_out(m_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL out_valid with no sample outstanding");
      end else begin
        e = exp_q.pop_front();
        if (m_out !== e.m || cycle - e.stamp != LAT) begin
          failures++;
          $display("FAIL m_out=%0d expected %0d, latency %0d expected %0d",
                   m_out, e.m, cycle - e.stamp, LAT);
        end
      end
    end else if (exp_q.size() != 0 && cycle - exp_q[0].stamp >= LAT) begin
      checks++;
      failures++;
      $display("FAIL result missing");
    end
  end

  // Drive one sample at a falling edge and check its ciphertext.
  task automatic drive(input logic [M_W-1:0] a, input logic [M_W-1:0] b,
                       input logic [R_W-1:0] rr, input logic [P_W-1:0] pp,
                       input logic [Q_W-1:0] qq);
    logic [127:0] ref1, ref2;
    longint unsigned want;
    m1 <= a; m2 <= b; r <= rr; p <= pp; q <= qq; in_valid <= 1'b1;
    want = (longint'(a) * longint'(b)) % longint'(pp);
    exp_q.push_back('{m: M_W'(want), stamp: cycle});
    #1;
    ref1 = 128'(a) + 128'(pp) * (2 * 128'(rr) + 128'(qq));
    ref2 = 128'(b) + 128'(pp) * (2 * 128'(rr) + 128'(qq));
    checks += 4;
    if (128'(ct1) !== ref1 || 128'(ct2) !== ref2) begin
      failures++;
      $display("FAIL ct1=%0d ct2=%0d expected %0d %0d", ct1, ct2, ref1, ref2);
    end
    if (ct_prod !== ref1 * ref2) begin
      failures++;
      $display("FAIL ct_prod=%0d expected %0d", ct_prod, ref1 * ref2);
    end
    if (64'(plain_prod) !== 64'(a) * 64'(b)) begin
      failures++;
      $display("FAIL plain_prod=%0d", plain_prod);
    end
    if (ct_prod % 128'(pp) != 128'(want)) begin
      failures++;
      $display("FAIL ct_prod mod p");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    @(negedge clk) drive(25'd60, 25'd65, 16'd13, 32'd9321, 16'd31);
    checks++;
    if (ct1 != 64'd531357 || ct2 != 64'd531362 ||
        ct_prod != 128'd282342918234 || plain_prod != 50'd3900) begin
      failures++;
      $display("FAIL worked example %0d %0d %0d %0d", ct1, ct2, ct_prod, plain_prod);
    end
    @(negedge clk) drive(25'd72, 25'd65, 16'd124, 32'd1207645633, 16'd100);

    for (int i = 0; i < 3000; i++) begin
      logic [P_W-1:0] pp;
      pp = (i % 2 == 0) ? (P_W'($urandom) | 1) : P_W'($urandom_range(2, 70000));
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) in_valid <= 1'b0;
      else if (i % 5 == 0) drive(M_W'($urandom), M_W'($urandom), R_W'($urandom), pp, Q_W'($urandom));
      else drive(M_W'($urandom % pp), M_W'($urandom % pp), R_W'($urandom), pp, Q_W'($urandom));
    end
    @(negedge clk);
    in_valid <= 1'b0;
    repeat (LAT + 2) @(negedge clk);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
