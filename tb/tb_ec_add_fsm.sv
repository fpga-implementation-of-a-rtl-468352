// tb_ec_add_fsm: self-checking test of the point addition sequencer.
//
// The sequencer drives a default 193-bit gf2m_alu. Random points (and, for
// the curve coefficient, random a) are processed and the result is compared
// with the affine formulas of ec_ref_pkg, which invert by Fermat's theorem.
// The clock count of each operation is checked against its budget of
// 1 inversion, 3 multiplications or squarings and 8 additions:
// the inversion's own bound (5m + 8), m + 1 per multiplication, one per
// addition and two per operation for issue and write-back.
module tb_ec_add_fsm;
  import gf2m_pkg::*;
  import ec_ref_pkg::*;

  localparam int unsigned M = 193;
  localparam logic [256:0] POLY_R = (257'd1 << 193) | (257'd1 << 15) | 257'd1;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic         start, busy, done;
  logic [M-1:0] x3, y3;
  logic         alu_start, alu_busy, alu_done;
  gf_op_t       alu_op;
  logic [M-1:0] alu_a, alu_b, alu_res;
  pt_t          p, q, e;
  fe_t          a;

  gf2m_alu u_alu (.clk, .rst_n, .start(alu_start), .op(alu_op), .opa(alu_a), .opb(alu_b),
                  .busy(alu_busy), .done(alu_done), .result(alu_res));
  ec_add_fsm dut (.clk, .rst_n, .start, .x1(p.x[M-1:0]), .y1(p.y[M-1:0]), .x2(q.x[M-1:0]), .y2(q.y[M-1:0]), .a_coef(a[M-1:0]),
            .busy, .done, .x3, .y3, .alu_start, .alu_op, .alu_a, .alu_b, .alu_done, .alu_res);

  initial begin
    int cyc, nops;
    rst_n = 1'b0;
    start = 1'b0;
    p = '0; q = '0; a = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      p.inf = 1'b0; p.x = rnd_fe(M); p.y = rnd_fe(M);
      q.inf = 1'b0; q.x = rnd_fe(M); q.y = rnd_fe(M);
      a = (t == 0) ? '0 : rnd_fe(M);
      e = padd(p, q, a, M, POLY_R);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      nops = 0;
      while (!done) begin
        if (alu_start) nops++;
        @(negedge clk);
        cyc++;
      end
      checks += 3;
      if (256'(x3) !== e.x || 256'(y3) !== e.y) begin
        failures++;
        $display("FAIL test %0d: got %h %h expected %h %h", t, x3, y3, e.x, e.y);
      end
      if (nops != 12) begin
        failures++;
        $display("FAIL test %0d: %0d field operations, expected 12", t, nops);
      end
      if (cyc > (5*M + 8) + 3*(M + 1) + 8 + 2*12 + 2 || cyc < 3*(M + 1)) begin
        failures++;
        $display("FAIL test %0d: took %0d clocks", t, cyc);
      end
      if (t == 0) $display("point addition took %0d clocks", cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
