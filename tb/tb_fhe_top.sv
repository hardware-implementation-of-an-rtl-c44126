// tb_fhe_top: end-to-end test of the whole design at its default sizes.
// The three systems run at once on independent random streams (with
// random gaps) and every result is compared, two cycles after its sample,
// with a value computed from the plaintexts alone:
//   encryption-decryption:  m               (m < p)
//   additive evaluation:    (m1 + m2) mod p
//   multiplicative:         (m1 * m2) mod p
// The worked examples of the design (key 1207645633 with q = 100, r = 124;
// key 9321 with q = 31, r = 13) open each stream. The test counts how
// often each mechanism occurred: a round trip, a homomorphic addition, a
// homomorphic multiplication, a multiplication whose ciphertext product
// exceeds 64 bits, and back-to-back samples on one system; a mechanism that
// never occurred counts as a failure.
module tb_fhe_top;
  import fhe_pkg::*;

  localparam int unsigned LAT = DEC_LATENCY;
  localparam int          N   = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  logic              ed_in_valid = 1'b0;
  logic [M_W-1:0]    ed_m = '0;
  logic [R_W-1:0]    ed_r = '0;
  logic [P_W-1:0]    ed_p = 1;
  logic [Q_W-1:0]    ed_q = '0;
  logic [CT_W-1:0]   ed_ct;
  logic              ed_out_valid;
  logic [M_W-1:0]    ed_m_out;

  logic              add_in_valid = 1'b0;
  logic [M_W-1:0]    add_m1 = '0, add_m2 = '0;
  logic [R_W-1:0]    add_r = '0;
  logic [P_W-1:0]    add_p = 1;
  logic [Q_W-1:0]    add_q = '0;
  logic [CT_W-1:0]   add_ct1, add_ct2;
  logic [CT_W:0]     add_ct_sum;
  logic [M_W:0]      add_plain_sum;
  logic              add_out_valid;
  logic [M_W-1:0]    add_m_out;

  logic              mul_in_valid = 1'b0;
  logic [M_W-1:0]    mul_m1 = '0, mul_m2 = '0;
  logic [R_W-1:0]    mul_r = '0;
  logic [P_W-1:0]    mul_p = 1;
  logic [Q_W-1:0]    mul_q = '0;
  logic [CT_W-1:0]   mul_ct1, mul_ct2;
  logic [2*CT_W-1:0] mul_ct_prod;
  logic [2*M_W-1:0]  mul_plain_prod;
  logic              mul_out_valid;
  logic [M_W-1:0]    mul_m_out;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_roundtrip = 0, n_add = 0, n_mul = 0, n_wide_prod = 0, n_back_to_back = 0;

  typedef struct {
    logic [M_W-1:0] m;
    int             stamp;
  } exp_t;
  exp_t ed_q_exp[$], add_q_exp[$], mul_q_exp[$];

  fhe_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (4 * N) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One output checker, used for all three systems.
  task automatic check_out(input string name, input logic valid,
                           input logic [M_W-1:0] got, ref exp_t q[$],
                           ref int count);
    exp_t e;
    if (valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL %s: out_valid with no sample outstanding", name);
      end else begin
        e = q.pop_front();
        if (got !== e.m || cycle - e.stamp != LAT) begin
          failures++;
          $display("FAIL %s: got %0d expected %0d, latency %0d", name, got,
                   e.m, cycle - e.stamp);
        end else count++;
      end
    end else if (q.size() != 0 && cycle - q[0].stamp >= LAT) begin
      checks++;
      failures++;
      $display("FAIL %s: result missing", name);
    end
  endtask

  logic mul_prev_valid = 1'b0;
  always @(negedge clk) if (rst_n) begin
    check_out("encdec", ed_out_valid, ed_m_out, ed_q_exp, n_roundtrip);
    check_out("add", add_out_valid, add_m_out, add_q_exp, n_add);
    check_out("mul", mul_out_valid, mul_m_out, mul_q_exp, n_mul);
  end

  function automatic logic [P_W-1:0] rand_key(input int i);
    return (i % 2 == 0) ? (P_W'($urandom) | 1) : P_W'($urandom_range(2, 70000));
  endfunction

  task automatic drive_ed(input logic [M_W-1:0] m, input logic [R_W-1:0] r,
                          input logic [P_W-1:0] p, input logic [Q_W-1:0] q);
    ed_m <= m; ed_r <= r; ed_p <= p; ed_q <= q; ed_in_valid <= 1'b1;
    ed_q_exp.push_back('{m: m, stamp: cycle});
  endtask

  task automatic drive_add(input logic [M_W-1:0] a, b, input logic [R_W-1:0] r,
                           input logic [P_W-1:0] p, input logic [Q_W-1:0] q);
    add_m1 <= a; add_m2 <= b; add_r <= r; add_p <= p; add_q <= q;
    add_in_valid <= 1'b1;
    add_q_exp.push_back('{m: M_W'((longint'(a) + longint'(b)) % longint'(p)),
                          stamp: cycle});
  endtask

  task automatic drive_mul(input logic [M_W-1:0] a, b, input logic [R_W-1:0] r,
                           input logic [P_W-1:0] p, input logic [Q_W-1:0] q);
    mul_m1 <= a; mul_m2 <= b; mul_r <= r; mul_p <= p; mul_q <= q;
    mul_in_valid <= 1'b1;
    mul_q_exp.push_back('{m: M_W'((longint'(a) * longint'(b)) % longint'(p)),
                          stamp: cycle});
  endtask

  // Count samples entering on consecutive cycles and wide products.
  always @(posedge clk) if (rst_n) begin
    if (mul_in_valid && mul_prev_valid) n_back_to_back++;
    mul_prev_valid <= mul_in_valid;
    if (mul_in_valid && mul_ct_prod[2*CT_W-1:CT_W] != '0) n_wide_prod++;
  end

  initial begin
    logic [P_W-1:0] p;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    @(negedge clk);
    drive_ed(25'd64, 16'd124, 32'd1207645633, 16'd100);
    drive_add(25'd72, 25'd65, 16'd124, 32'd1207645633, 16'd100);
    drive_mul(25'd60, 25'd65, 16'd13, 32'd9321, 16'd31);
    #1;
    checks++;
    if (ed_ct != 64'd420260680348 || add_ct_sum != 65'd840521360705 ||
        mul_ct_prod != 128'd282342918234) begin
      failures++;
      $display("FAIL worked-example ciphertexts %0d %0d %0d", ed_ct,
               add_ct_sum, mul_ct_prod);
    end

    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      p = rand_key(i);
      if ($urandom_range(0, 4) == 0) ed_in_valid <= 1'b0;
      else drive_ed(M_W'($urandom % p), R_W'($urandom), p, Q_W'($urandom));
      p = rand_key(i + 1);
      if ($urandom_range(0, 4) == 0) add_in_valid <= 1'b0;
      else drive_add(M_W'($urandom), M_W'($urandom), R_W'($urandom), p,
                     Q_W'($urandom));
      p = rand_key(i);
      if ($urandom_range(0, 4) == 0) mul_in_valid <= 1'b0;
      else drive_mul(M_W'($urandom), M_W'($urandom), R_W'($urandom), p,
                     Q_W'($urandom));
    end
    @(negedge clk);
    ed_in_valid <= 1'b0; add_in_valid <= 1'b0; mul_in_valid <= 1'b0;
    repeat (LAT + 2) @(negedge clk);

    checks++;
    if (ed_q_exp.size() + add_q_exp.size() + mul_q_exp.size() != 0) begin
      failures++;
      $display("FAIL results never appeared");
    end

    $display("mechanisms: roundtrip=%0d add=%0d mul=%0d wide_product=%0d back_to_back=%0d",
             n_roundtrip, n_add, n_mul, n_wide_prod, n_back_to_back);
    checks += 5;
    if (n_roundtrip == 0)    begin failures++; $display("FAIL no round trip"); end
    if (n_add == 0)          begin failures++; $display("FAIL no addition"); end
    if (n_mul == 0)          begin failures++; $display("FAIL no multiplication"); end
    if (n_wide_prod == 0)    begin failures++; $display("FAIL no wide product"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back samples"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
