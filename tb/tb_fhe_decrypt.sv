// tb_fhe_decrypt: self-checking test of the two-stage decryptor.
// Ciphertexts are built as C = k*p + m with m < p, so the expected output
// m is known without dividing. A new sample is presented on most cycles
// (gaps are random) and every result must appear exactly two cycles after
// its sample with out_valid set, and out_valid must stay low otherwise.
// The worked examples 840521360705 mod 1207645633 = 137 and
// 282342918234 mod 9321 = 3900 are included.
module tb_fhe_decrypt;
  import fhe_pkg::*;

  localparam int unsigned LAT = DEC_LATENCY;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            in_valid = 1'b0;
  logic [CT_W-1:0] c = '0;
  logic [P_W-1:0]  p = 1;
  logic            out_valid;
  logic [M_W-1:0]  m;

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    logic [M_W-1:0] m;
    int             stamp;
  } exp_t;
  exp_t exp_q[$];

  fhe_decrypt dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .c(c), .p(p),
    .out_valid(out_valid), .m(m)
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

  // Output side: compare at each falling edge.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL out_valid with no sample outstanding");
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (m !== e.m || cycle - e.stamp != LAT) begin
          failures++;
          $display("FAIL m=%0d expected %0d, latency %0d expected %0d",
                   m, e.m, cycle - e.stamp, LAT);
        end
      end
    end else if (exp_q.size() != 0 && cycle - exp_q[0].stamp >= LAT) begin
      checks++;
      failures++;
      $display("FAIL result missing after %0d cycles", cycle - exp_q[0].stamp);
    end
  end

  task automatic present(input logic [CT_W-1:0] cc, input logic [P_W-1:0] pp,
                         input logic [M_W-1:0] expected);
    @(negedge clk);
    c <= cc; p <= pp; in_valid <= 1'b1;
    exp_q.push_back('{m: expected, stamp: cycle});
    @(negedge clk);
    in_valid <= 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    present(64'd840521360705, 32'd1207645633, 25'd137);
    present(64'd282342918234, 32'd9321, 25'd3900);
    present(64'd420260680348, 32'd1207645633, 25'd64);

    // Back-to-back random stream with random gaps.
    for (int i = 0; i < 3000; i++) begin
      logic [P_W-1:0]  pp;
      logic [M_W-1:0]  mm;
      logic [31:0]     k;
      pp = P_W'($urandom) | 1;
      if (i % 3 == 0) pp = P_W'($urandom_range(2, 100000));
      mm = M_W'($urandom % pp);
      k  = $urandom;
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        in_valid <= 1'b0;
        c <= CT_W'($urandom);
      end else begin
        in_valid <= 1'b1;
        c  <= CT_W'(k) * CT_W'(pp) + CT_W'(mm);
        p  <= pp;
        exp_q.push_back('{m: mm, stamp: cycle});
      end
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
