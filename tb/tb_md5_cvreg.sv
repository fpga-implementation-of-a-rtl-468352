// tb_md5_cvreg: self-checking test of the 128-bit chaining register.
//
// Checks the MD5 initial value after reset, loading, holding, the cv_init
// strobe, and that cv_init wins when both strobes are high.
module tb_md5_cvreg;
  import md5_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n, cvreg_ld, cv_init;
  md5_cv_t incvreg, outcvreg, v;
  int      checks = 0, failures = 0;
  always #5 clk = ~clk;

  md5_cvreg dut (.*);

  localparam md5_cv_t IV = 128'h10325476_98badcfe_efcdab89_67452301;

  task automatic expect_cv(input md5_cv_t e, input string what);
    checks++;
    if (outcvreg !== e) begin failures++; $display("FAIL %s: %h expected %h", what, outcvreg, e); end
  endtask

  initial begin
    rst_n = 1'b0; cvreg_ld = 1'b0; cv_init = 1'b0; incvreg = '1;
    @(negedge clk);
    expect_cv(IV, "reset");
    rst_n = 1'b1;
    for (int t = 0; t < 10; t++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      incvreg = v; cvreg_ld = 1'b1;
      @(negedge clk);
      cvreg_ld = 1'b0;
      expect_cv(v, "load");
      incvreg = ~v;
      @(negedge clk);
      expect_cv(v, "hold");
    end
    cv_init = 1'b1;
    @(negedge clk);
    cv_init = 1'b0;
    expect_cv(IV, "init");
    incvreg = 128'h1; cvreg_ld = 1'b1;
    @(negedge clk);
    cv_init = 1'b1;
    @(negedge clk);
    cvreg_ld = 1'b0; cv_init = 1'b0;
    expect_cv(IV, "init over load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
