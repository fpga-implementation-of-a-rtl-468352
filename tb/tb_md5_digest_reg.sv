// tb_md5_digest_reg: self-checking test of the digest output registers.
//
// Checks zero after reset, that digest_ld splits {D,C,B,A} into aout..dout
// with a one-clock digest_valid pulse, and that the outputs hold otherwise.
module tb_md5_digest_reg;
  import md5_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, digest_ld, digest_valid;
  md5_cv_t     mainout, v;
  logic [31:0] aout, bout, cout, dout;
  int          checks = 0, failures = 0;
  always #5 clk = ~clk;

  md5_digest_reg dut (.*);

  initial begin
    rst_n = 1'b0; digest_ld = 1'b0; mainout = '1;
    @(negedge clk);
    checks++;
    if ({aout, bout, cout, dout, digest_valid} !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 10; t++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      mainout = v; digest_ld = 1'b1;
      @(negedge clk);
      digest_ld = 1'b0;
      checks += 2;
      if (aout !== v[31:0] || bout !== v[63:32] || cout !== v[95:64] || dout !== v[127:96]) begin
        failures++; $display("FAIL load %0d", t);
      end
      if (digest_valid !== 1'b1) begin failures++; $display("FAIL valid %0d", t); end
      mainout = ~v;
      @(negedge clk);
      checks += 2;
      if ({dout, cout, bout, aout} !== v) begin failures++; $display("FAIL hold %0d", t); end
      if (digest_valid !== 1'b0) begin failures++; $display("FAIL valid not a pulse %0d", t); end
    end
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
