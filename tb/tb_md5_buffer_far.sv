// tb_md5_buffer_far: self-checking test of the first MD5 buffer stage.
//
// Writes message bytes one by one, then each padding type at several
// positions, and compares the whole 64-byte buffer with an expected image
// built byte by byte in this testbench (0x80 marker, zero fill and the
// little-endian bit length in bytes 56..63).
module tb_md5_buffer_far;
  import md5_pkg::*;

  logic        clk = 1'b0;
  logic        buf_far_ld;
  logic [7:0]  msg;
  logic [5:0]  count64;
  logic [60:0] msgsizeout;
  md5_pad_t    padtype;
  md5_block_t  buffer_far_out;
  logic [7:0]  img [64];
  int          checks = 0, failures = 0;
  always #5 clk = ~clk;

  md5_buffer_far dut (.*);

  task automatic put(input int pos, input logic [7:0] v);
    @(negedge clk);
    buf_far_ld = 1'b1; padtype = PAD_NONE; count64 = 6'(pos); msg = v;
    @(negedge clk);
    buf_far_ld = 1'b0;
    img[pos] = v;
  endtask

  task automatic pad(input md5_pad_t ty, input int pos, input logic [60:0] nbytes);
    logic [63:0] bits;
    @(negedge clk);
    buf_far_ld = 1'b1; padtype = ty; count64 = 6'(pos); msgsizeout = nbytes; msg = 8'hff;
    @(negedge clk);
    buf_far_ld = 1'b0;
    bits = 64'(nbytes) * 8;
    for (int i = pos; i < 64; i++) img[i] = 8'h00;
    if (ty == PAD_ONE_LEN || ty == PAD_ONE) img[pos] = 8'h80;
    if (ty == PAD_ONE_LEN || ty == PAD_LEN)
      for (int i = 0; i < 8; i++) img[56 + i] = bits[8*i +: 8];
  endtask

  task automatic compare(input string what);
    checks++;
    for (int i = 0; i < 64; i++)
      if (buffer_far_out[i] !== img[i]) begin
        failures++;
        $display("FAIL %s: byte %0d is %h expected %h", what, i, buffer_far_out[i], img[i]);
        break;
      end
  endtask

  initial begin
    buf_far_ld = 1'b0; msg = '0; count64 = '0; msgsizeout = '0; padtype = PAD_NONE;
    for (int i = 0; i < 64; i++) put(i, 8'($urandom));
    compare("full block");
    for (int i = 0; i < 5; i++) put(i, 8'(i + 1));
    pad(PAD_ONE_LEN, 5, 61'd69);
    compare("PAD_ONE_LEN at 5");
    for (int i = 0; i < 55; i++) put(i, 8'($urandom));
    pad(PAD_ONE_LEN, 55, 61'h1234_5678_9abc);
    compare("PAD_ONE_LEN at 55");
    for (int i = 0; i < 60; i++) put(i, 8'($urandom));
    pad(PAD_ONE, 60, 61'd60);
    compare("PAD_ONE at 60");
    pad(PAD_LEN, 0, 61'd60);
    compare("PAD_LEN at 0");
    pad(PAD_ONE_LEN, 0, 61'h1fff_ffff_ffff_ffff);
    compare("PAD_ONE_LEN at 0");
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
