// tb_fhe_encdec_system: self-checking round-trip test of the
// encryption-decryption system. Each sample (m < p) must come back out as
// m exactly two cycles later, flagged by out_valid; the combinational
// ciphertext is checked against m + p*(2r + q). The first samples are the
// worked example (key 1207645633, q = 100, r = 124, m = 64, 72, 65); the
// rest are random, presented back to back with random gaps.
module tb_fhe_encdec_system;
  import fhe_pkg::*;

  localparam int unsigned LAT = DEC_LATENCY;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            in_valid = 1'b0;
  logic [M_W-1:0]  m = '0;
  logic [R_W-1:0]  r = '0;
  logic [P_W-1:0]  p = 1;
  logic [Q_W-1:0]  q = '0;
  logic [CT_W-1:0] ct;
  logic            out_valid;
  logic [M_W-1:0]  m_out;

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    logic [M_W-1:0] m;
    int             stamp;
  } exp_t;
  exp_t exp_q[$];

  fhe_encdec_system dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .m(m), .r(r), .p(p), .q(q),
    .ct(ct), .out_valid(out_valid), .m_out(m_out)
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
  task automatic drive(input logic [M_W-1:0] mm, input logic [R_W-1:0] rr,
                       input logic [P_W-1:0] pp, input logic [Q_W-1:0] qq);
    logic [127:0] ref_ct;
    m <= mm; r <= rr; p <= pp; q <= qq; in_valid <= 1'b1;
    exp_q.push_back('{m: mm, stamp: cycle});
    #1;
    ref_ct = 128'(mm) + 128'(pp) * (2 * 128'(rr) + 128'(qq));
    checks++;
    if (128'(ct) !== ref_ct) begin
      failures++;
      $display("FAIL ct=%0d expected %0d", ct, ref_ct);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    @(negedge clk) drive(25'd64, 16'd124, 32'd1207645633, 16'd100);
    checks++;
    if (ct != 64'd420260680348) begin
      failures++;
      $display("FAIL worked example ciphertext %0d", ct);
    end
    @(negedge clk) drive(25'd72, 16'd124, 32'd1207645633, 16'd100);
    @(negedge clk) drive(25'd65, 16'd124, 32'd1207645633, 16'd100);

    for (int i = 0; i < 3000; i++) begin
      logic [P_W-1:0] pp;
      pp = (i % 2 == 0) ? (P_W'($urandom) | 1) : P_W'($urandom_range(2, 70000));
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) in_valid <= 1'b0;
      else drive(M_W'($urandom % pp), R_W'($urandom), pp, Q_W'($urandom));
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
