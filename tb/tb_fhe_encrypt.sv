// tb_fhe_encrypt: self-checking test of the combinational encryptor.
// Checks the worked examples (key 1207645633 with q = 100, r = 124 and
// messages 64, 72, 65; key 9321 with q = 31, r = 13 and messages 60, 65)
// against their known ciphertexts, then random operands against
// m + p*(2r + q) computed on 128 bits, a different factorisation of the
// encryption equation. Each ciphertext is also checked to decrypt to m.
module tb_fhe_encrypt;
  import fhe_pkg::*;

  logic [M_W-1:0]  m;
  logic [R_W-1:0]  r;
  logic [P_W-1:0]  p;
  logic [Q_W-1:0]  q;
  logic [CT_W-1:0] ct;

  int checks = 0, failures = 0;

  fhe_encrypt dut (.m(m), .r(r), .p(p), .q(q), .ct(ct));

  task automatic check_known(input longint unsigned mm, rr, pp, qq,
                             input logic [CT_W-1:0] expected);
    m = M_W'(mm); r = R_W'(rr); p = P_W'(pp); q = Q_W'(qq);
    #1;
    checks++;
    if (ct !== expected) begin
      failures++;
      $display("FAIL known m=%0d r=%0d p=%0d q=%0d: ct=%0d expected %0d",
               mm, rr, pp, qq, ct, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] ref_ct;
    check_known(64, 124, 1207645633, 100, 64'd420260680348);
    check_known(72, 124, 1207645633, 100, 64'd420260680356);
    check_known(65, 124, 1207645633, 100, 64'd420260680349);
    check_known(60, 13, 9321, 31, 64'd531357);
    check_known(65, 13, 9321, 31, 64'd531362);

    repeat (2000) begin
      m = M_W'($urandom);
      r = R_W'($urandom);
      p = P_W'($urandom) | 1;
      q = Q_W'($urandom);
      #1;
      ref_ct = 128'(m) + 128'(p) * (128'(r) * 2 + 128'(q));
      checks++;
      if (128'(ct) !== ref_ct) begin
        failures++;
        $display("FAIL rand m=%0d r=%0d p=%0d q=%0d: ct=%0d expected %0d",
                 m, r, p, q, ct, ref_ct);
      end
      // m < p must come back out as ct mod p.
      if (128'(m) < 128'(p)) begin
        checks++;
        if (128'(ct) % 128'(p) != 128'(m)) begin
          failures++;
          $display("FAIL rand ct mod p != m (m=%0d p=%0d)", m, p);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
