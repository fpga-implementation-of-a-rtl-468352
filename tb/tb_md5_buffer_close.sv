// tb_md5_buffer_close: self-checking test of the second MD5 buffer stage.
//
// Loads random blocks and checks that each appears one clock after
// buf_clo_ld and is held unchanged while the input keeps changing.
module tb_md5_buffer_close;
  import md5_pkg::*;

  logic       clk = 1'b0;
  logic       buf_clo_ld;
  md5_block_t buffer_far_out, buffer_close_out, held;
  int         checks = 0, failures = 0;
  always #5 clk = ~clk;

  md5_buffer_close dut (.*);

  function automatic md5_block_t rnd_block();
    md5_block_t v;
    for (int i = 0; i < 16; i++) v[4*i +: 4] = $urandom;
    return v;
  endfunction

  initial begin
    buf_clo_ld = 1'b0;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      held = rnd_block();
      buffer_far_out = held;
      buf_clo_ld = 1'b1;
      @(negedge clk);
      buf_clo_ld = 1'b0;
      checks++;
      if (buffer_close_out !== held) begin failures++; $display("FAIL load %0d", t); end
      for (int h = 0; h < 3; h++) begin
        buffer_far_out = rnd_block();
        @(negedge clk);
        checks++;
        if (buffer_close_out !== held) begin failures++; $display("FAIL hold %0d", t); end
      end
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
