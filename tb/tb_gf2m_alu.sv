// tb_gf2m_alu: self-checking test of the combined GF(2^m) operator.
//
// Two instances: the default 193-bit field (x^193 + x^15 + 1) with random
// operands, and GF(2^8) with x^8 + x^4 + x^3 + x + 1, where every non-zero
// element is inverted. The reference multiplies by schoolbook polynomial
// multiplication followed by long division, and inverts by Fermat's little
// theorem (a^(2^m - 2)), so it shares no algorithm with the operator. Also
// checks the clock counts of addition (1) and multiplication/squaring (m + 1
// from start to done).
module tb_gf2m_alu;
  import gf2m_pkg::*;

  localparam int unsigned MB = 193;
  localparam logic [MB:0] PB = (194'd1 << 193) | (194'd1 << 15) | 194'd1;
  localparam int unsigned MS = 8;
  localparam logic [MS:0] PS = 9'h11b;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic          b_start, b_busy, b_done;
  gf_op_t        b_op;
  logic [MB-1:0] b_a, b_b, b_res;
  logic          s_start, s_busy, s_done;
  gf_op_t        s_op;
  logic [MS-1:0] s_a, s_b, s_res;

  gf2m_alu dut_big (.clk, .rst_n, .start(b_start), .op(b_op), .opa(b_a), .opb(b_b),
                    .busy(b_busy), .done(b_done), .result(b_res));
  gf2m_alu #(.M(MS), .POLY(PS)) dut_small (.clk, .rst_n, .start(s_start), .op(s_op),
                    .opa(s_a), .opb(s_b), .busy(s_busy), .done(s_done), .result(s_res));

  // Reference arithmetic in GF(2^193).
  function automatic logic [MB-1:0] ref_mul(input logic [MB-1:0] x, y);
    logic [2*MB-1:0] p;
    p = '0;
    for (int i = 0; i < MB; i++) if (y[i]) p ^= (2*MB)'(x) << i;
    for (int i = 2*MB-2; i >= MB; i--) if (p[i]) p ^= (2*MB)'(PB) << (i - MB);
    return p[MB-1:0];
  endfunction
  function automatic logic [MB-1:0] ref_inv(input logic [MB-1:0] x);
    logic [MB-1:0] r, s;     // x^(2^m-2) = prod over i=1..m-1 of x^(2^i)
    r = MB'(1);
    s = x;
    for (int i = 1; i < MB; i++) begin
      s = ref_mul(s, s);
      r = ref_mul(r, s);
    end
    return r;
  endfunction
  function automatic logic [MS-1:0] ref_mul_s(input logic [MS-1:0] x, y);
    logic [2*MS-1:0] p;
    p = '0;
    for (int i = 0; i < MS; i++) if (y[i]) p ^= (2*MS)'(x) << i;
    for (int i = 2*MS-2; i >= MS; i--) if (p[i]) p ^= (2*MS)'(PS) << (i - MS);
    return p[MS-1:0];
  endfunction

  function automatic logic [MB-1:0] rnd_big();
    logic [MB-1:0] v;
    v = '0;
    for (int i = 0; i < (MB + 31) / 32; i++)
      for (int b = 0; b < 32; b++) if (32*i + b < MB) v[32*i + b] = 1'($urandom >> b);
    return v;
  endfunction

  task automatic big_op(input gf_op_t op, input logic [MB-1:0] a, b,
                        input logic [MB-1:0] expect_v, input int expect_lat);
    int lat;
    @(negedge clk);
    b_op = op; b_a = a; b_b = b; b_start = 1'b1;
    @(negedge clk);
    b_start = 1'b0;
    lat = 1;
    while (!b_done) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (b_res !== expect_v) begin
      failures++;
      $display("FAIL op %s: got %h expected %h", op.name(), b_res, expect_v);
    end
    if (expect_lat > 0) begin
      checks++;
      if (lat != expect_lat) begin
        failures++;
        $display("FAIL op %s latency %0d expected %0d", op.name(), lat, expect_lat);
      end
    end
  endtask

  initial begin
    logic [MB-1:0] x, y;
    rst_n = 1'b0;
    b_start = 1'b0; b_op = GF_ADD; b_a = '0; b_b = '0;
    s_start = 1'b0; s_op = GF_INV; s_a = '0; s_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 12; t++) begin
      x = rnd_big();
      y = rnd_big();
      big_op(GF_ADD, x, y, x ^ y, 1);
      big_op(GF_MUL, x, y, ref_mul(x, y), MB + 1);
      big_op(GF_SQR, x, y, ref_mul(x, x), MB + 1);
      big_op(GF_INV, x, y, ref_inv(x), 0);
    end
    big_op(GF_INV, MB'(1), '0, MB'(1), 0);
    big_op(GF_INV, '0, '0, '0, 0);
    big_op(GF_INV, {1'b1, {(MB-1){1'b0}}}, '0, ref_inv({1'b1, {(MB-1){1'b0}}}), 0);
    // Every non-zero element of GF(2^8).
    for (int v = 1; v < 256; v++) begin
      @(negedge clk);
      s_a = 8'(v); s_start = 1'b1;
      @(negedge clk);
      s_start = 1'b0;
      while (!s_done) @(negedge clk);
      checks++;
      if (ref_mul_s(8'(v), s_res) != 8'd1) begin
        failures++;
        $display("FAIL GF(2^8) inverse of %h: got %h", v, s_res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
