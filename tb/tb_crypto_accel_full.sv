// tb_crypto_accel_full: the accelerator with every parameter at its default
// (193-bit EC field), one complete operation of each engine.
//
// Hashes "abc" and the "quick brown fox" sentence, checking the standard MD5
// digests, and runs one full 193-bit scalar multiplication through the
// register port, checking it against the ec_ref_pkg reference and the curve
// equation. Prints the clock count of the scalar multiplication.
module tb_crypto_accel_full;
  import ec_ref_pkg::*;

  localparam int M = 193;
  localparam int NW = 7;
  localparam logic [256:0] POLY_R = (257'd1 << 193) | (257'd1 << 15) | 257'd1;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [7:0]  md5_msg;
  logic        md5_valid, md5_last, md5_ready;
  logic [31:0] md5_aout, md5_bout, md5_cout, md5_dout;
  logic        md5_digest_valid;
  logic        ec_wr_en;
  logic [5:0]  ec_addr;
  logic [31:0] ec_wdata, ec_rdata;
  logic        ec_irq;
  int          checks = 0, failures = 0;
  always #5 clk = ~clk;

  crypto_accel_top dut (.*);

  task automatic hash(input string s, input logic [127:0] e);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk);
      md5_msg = s[i]; md5_valid = 1'b1; md5_last = (i == s.len() - 1);
      #1;
      while (!md5_ready) @(negedge clk);
    end
    @(negedge clk);
    md5_valid = 1'b0; md5_last = 1'b0;
    while (!md5_digest_valid) @(negedge clk);
    checks++;
    if ({md5_dout, md5_cout, md5_bout, md5_aout} !== e) begin
      failures++;
      $display("FAIL MD5(\"%s\") = %h expected %h", s, {md5_dout, md5_cout, md5_bout, md5_aout}, e);
    end
  endtask

  task automatic bus_wr(input int r, input int w, input logic [31:0] d);
    @(negedge clk);
    ec_wr_en = 1'b1; ec_addr = 6'(r * 8 + w); ec_wdata = d;
    @(negedge clk);
    ec_wr_en = 1'b0;
  endtask

  task automatic bus_rd_fe(input int r, output fe_t v);
    v = '0;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      ec_addr = 6'(r * 8 + w);
      #1 v[32*w +: 32] = ec_rdata;
    end
  endtask

  initial begin
    pt_t p, e;
    fe_t k, a, b, qx, qy;
    int  cyc;
    rst_n = 1'b0;
    md5_msg = '0; md5_valid = 1'b0; md5_last = 1'b0;
    ec_wr_en = 1'b0; ec_addr = '0; ec_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    hash("abc", 128'h727fe1287d3f96d6b04fd23c98500190);
    hash("The quick brown fox jumps over the lazy dog", 128'hd619a442351dd86b82b62b379d7d109e);
    p.inf = 1'b0;
    p.x = rnd_fe(M); p.y = rnd_fe(M); a = rnd_fe(M); k = rnd_fe(M);
    k[M-1] = 1'b1;
    b = curve_b(p.x, p.y, a, M, POLY_R);
    e = pmul(k, p, a, M, POLY_R);
    for (int w = 0; w < NW; w++) begin
      bus_wr(0, w, k[32*w +: 32]);
      bus_wr(1, w, p.x[32*w +: 32]);
      bus_wr(2, w, p.y[32*w +: 32]);
      bus_wr(3, w, a[32*w +: 32]);
    end
    bus_wr(6, 0, 32'h1);
    cyc = 0;
    while (!ec_irq) begin
      @(negedge clk);
      cyc++;
    end
    $display("193-bit scalar multiplication: %0d clocks", cyc);
    bus_rd_fe(4, qx);
    bus_rd_fe(5, qy);
    checks += 2;
    if (qx !== e.x || qy !== e.y) begin
      failures++;
      $display("FAIL kP: got %h %h expected %h %h", qx, qy, e.x, e.y);
    end
    if (curve_b(qx, qy, a, M, POLY_R) != b) begin
      failures++;
      $display("FAIL kP not on the curve");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
