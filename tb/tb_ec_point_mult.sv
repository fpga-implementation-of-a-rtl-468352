// tb_ec_point_mult: self-checking test of double-and-add scalar multiplication.
//
// Instance dut_s works in GF(2^8) (x^8 + x^4 + x^3 + x + 1): for random curves
// and base points it runs every scalar 0..255, so the special cases
// (Q = P, Q = -P, Q at infinity, order-two points) all occur. Instance dut_b
// uses the default 193-bit field with random scalars. Each result is compared
// with the least-significant-bit-first reference of ec_ref_pkg and, when
// finite, checked to lie on the curve. The testbench counts how often each
// special case was taken and fails if one never was.
module tb_ec_point_mult;
  import gf2m_pkg::*;
  import ec_ref_pkg::*;

  localparam int unsigned MS = 8;
  localparam logic [MS:0] PS = 9'h11b;
  localparam logic [256:0] POLY_S = 257'h11b;
  localparam logic [256:0] POLY_B = (257'd1 << 193) | (257'd1 << 15) | 257'd1;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;
  int   n_same = 0, n_neg = 0, n_copy = 0, n_add = 0, n_dbl = 0, n_zero = 0;
  always #5 clk = ~clk;

  logic          s_start, s_busy, s_done, s_inf;
  logic [MS-1:0] s_k, s_px, s_py, s_a, s_qx, s_qy;
  logic          b_start, b_busy, b_done, b_inf;
  logic [192:0]  b_k, b_px, b_py, b_a, b_qx, b_qy;

  ec_point_mult #(.M(MS), .POLY(PS)) dut_s (
    .clk, .rst_n, .start(s_start), .k(s_k), .px(s_px), .py(s_py), .a_coef(s_a),
    .busy(s_busy), .done(s_done), .qx(s_qx), .qy(s_qy), .q_inf(s_inf));
  ec_point_mult dut_b (
    .clk, .rst_n, .start(b_start), .k(b_k), .px(b_px), .py(b_py), .a_coef(b_a),
    .busy(b_busy), .done(b_done), .qx(b_qx), .qy(b_qy), .q_inf(b_inf));

  // Mechanism counters (small instance).
  always @(posedge clk) begin
    if (dut_s.u_add.done) n_add++;
    if (dut_s.u_dbl.done) n_dbl++;
    if (dut_s.state == dut_s.S_ADD_CHK && dut_s.k_q[dut_s.idx]) begin
      if (dut_s.q_inf) n_copy++;
      else if (dut_s.qx == dut_s.px_q && dut_s.qy == dut_s.py_q) n_same++;
      else if (dut_s.qx == dut_s.px_q) n_neg++;
    end
    if (dut_s.state == dut_s.S_DBL_CHK && !dut_s.q_inf && dut_s.qx == '0) n_zero++;
  end

  task automatic check(input pt_t got, input pt_t exp, input fe_t a, input fe_t b,
                       input int m, input logic [256:0] poly, input string what);
    checks++;
    if (got.inf !== exp.inf || (!exp.inf && (got.x !== exp.x || got.y !== exp.y))) begin
      failures++;
      $display("FAIL %s: got inf=%0b x=%h y=%h expected inf=%0b x=%h y=%h",
               what, got.inf, got.x, got.y, exp.inf, exp.x, exp.y);
    end
    if (!got.inf) begin
      checks++;
      if (curve_b(got.x, got.y, a, m, poly) != b) begin
        failures++;
        $display("FAIL %s: result not on the curve", what);
      end
    end
  endtask

  initial begin
    pt_t  p, q, e;
    fe_t  a, b, k;
    rst_n = 1'b0;
    s_start = 0; s_k = 0; s_px = 0; s_py = 0; s_a = 0;
    b_start = 0; b_k = 0; b_px = 0; b_py = 0; b_a = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Small field: every scalar for a few curves.
    for (int c = 0; c < 4; c++) begin
      do begin
        p.inf = 1'b0;
        p.x = (c == 0) ? 256'd0 : rnd_fe(MS);   // c = 0: a point of order two
        p.y = rnd_fe(MS);
        a   = rnd_fe(MS);
        b   = curve_b(p.x, p.y, a, MS, POLY_S);
      end while (b == '0);
      for (int kv = 0; kv < 256; kv++) begin
        @(negedge clk);
        s_k = 8'(kv); s_px = p.x[7:0]; s_py = p.y[7:0]; s_a = a[7:0]; s_start = 1'b1;
        @(negedge clk);
        s_start = 1'b0;
        while (!s_done) @(negedge clk);
        q.inf = s_inf; q.x = 256'(s_qx); q.y = 256'(s_qy);
        e = pmul(256'(kv), p, a, MS, POLY_S);
        check(q, e, a, b, MS, POLY_S, $sformatf("GF(2^8) curve %0d k=%0d", c, kv));
      end
    end
    // Default field: random scalars.
    for (int t = 0; t < 2; t++) begin
      p.inf = 1'b0;
      p.x = rnd_fe(193); p.y = rnd_fe(193); a = rnd_fe(193);
      b = curve_b(p.x, p.y, a, 193, POLY_B);
      k = rnd_fe(193);
      if (t == 1) k = 256'd5;
      @(negedge clk);
      b_k = k[192:0]; b_px = p.x[192:0]; b_py = p.y[192:0]; b_a = a[192:0]; b_start = 1'b1;
      @(negedge clk);
      b_start = 1'b0;
      while (!b_done) @(negedge clk);
      q.inf = b_inf; q.x = 256'(b_qx); q.y = 256'(b_qy);
      e = pmul(k, p, a, 193, POLY_B);
      check(q, e, a, b, 193, POLY_B, $sformatf("GF(2^193) test %0d", t));
    end
    $display("mechanisms: add %0d, double %0d, copy P %0d, Q=P %0d, Q=-P %0d, x=0 double %0d",
             n_add, n_dbl, n_copy, n_same, n_neg, n_zero);
    checks++;
    if (n_add == 0 || n_dbl == 0 || n_copy == 0 || n_same == 0 || n_neg == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
