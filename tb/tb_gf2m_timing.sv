// tb_gf2m_timing: clock counts of the field operations in GF(2^193).
//
// Runs 200 random inversions, 20 multiplications and 20 additions on the
// default operator, checks every result (a * a^-1 = 1 with a schoolbook
// reference multiplier; products against the same reference) and prints the
// minimum, mean and maximum clock count of each operation, from start to
// done. Inversions must stay within 5m + 8 clocks, multiplications take m + 1
// and additions 1.
module tb_gf2m_timing;
  import gf2m_pkg::*;
  import ec_ref_pkg::*;

  localparam int M = 193;
  localparam logic [256:0] POLY_R = (257'd1 << 193) | (257'd1 << 15) | 257'd1;

  logic         clk = 1'b0;
  logic         rst_n, start, busy, done;
  gf_op_t       op;
  logic [M-1:0] opa, opb, result;
  int           checks = 0, failures = 0;
  always #5 clk = ~clk;

  gf2m_alu dut (.*);

  task automatic run(input gf_op_t o, input fe_t a, input fe_t b, output int lat);
    @(negedge clk);
    op = o; opa = a[M-1:0]; opb = b[M-1:0]; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
  endtask

  initial begin
    fe_t a, b;
    int  lat, mn, mx, sum;
    rst_n = 1'b0; start = 1'b0; op = GF_ADD; opa = '0; opb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mn = 1 << 30; mx = 0; sum = 0;
    for (int t = 0; t < 200; t++) begin
      do a = rnd_fe(M); while (a == '0);
      run(GF_INV, a, '0, lat);
      mn = (lat < mn) ? lat : mn;
      mx = (lat > mx) ? lat : mx;
      sum += lat;
      checks++;
      if (fmul(a, 256'(result), M, POLY_R) !== 256'd1 || lat > 5 * M + 8) begin
        failures++;
        $display("FAIL inversion %0d (%0d clocks)", t, lat);
      end
    end
    $display("inversion: min %0d, mean %0d, max %0d clocks", mn, sum / 200, mx);
    for (int t = 0; t < 20; t++) begin
      a = rnd_fe(M);
      b = rnd_fe(M);
      run(GF_MUL, a, b, lat);
      checks++;
      if (256'(result) !== fmul(a, b, M, POLY_R) || lat != M + 1) begin
        failures++;
        $display("FAIL multiplication %0d (%0d clocks)", t, lat);
      end
      run(GF_ADD, a, b, lat);
      checks++;
      if (256'(result) !== (a ^ b) || lat != 1) begin
        failures++;
        $display("FAIL addition %0d (%0d clocks)", t, lat);
      end
    end
    $display("multiplication: %0d clocks, addition: 1 clock", M + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
