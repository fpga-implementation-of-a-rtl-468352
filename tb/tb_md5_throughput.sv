// tb_md5_throughput: MD5 throughput workload on full-size packets.
//
// Hashes four 1500-byte messages (the size of a full Ethernet IP packet),
// byte i being (31*i + 5) mod 256, back to back with the input held valid
// throughout, and checks each digest against the standard MD5 value. It then
// checks the clock count: 1500 clocks of input per message plus one padding
// stall (the last block holds 28 bytes), so 1501 clocks per message, and
// prints the resulting rate at a 100 MHz clock (about 799 Mbit/s).
module tb_md5_throughput;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [7:0]  msg;
  logic        msg_valid, msg_last, msg_ready;
  logic [31:0] aout, bout, cout, dout;
  logic        digest_valid;
  int          checks = 0, failures = 0;
  int          cycle = 0, ndig = 0, t_first, t_last;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int LEN = 1500;
  localparam int NMSG = 4;
  localparam logic [127:0] DIGEST = 128'ha41f379c9e9a4a9f4c6eaebdcec8204e;

  md5_hash dut (.*);

  always @(posedge clk) begin
    if (msg_valid && msg_ready && msg_last) t_last = cycle;
    if (digest_valid) begin
      ndig++;
      checks++;
      if ({dout, cout, bout, aout} !== DIGEST) begin
        failures++;
        $display("FAIL digest %0d: %h", ndig, {dout, cout, bout, aout});
      end
    end
  end

  initial begin
    real mbps;
    rst_n = 1'b0; msg = '0; msg_valid = 1'b0; msg_last = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t_first = cycle;
    for (int n = 0; n < NMSG; n++)
      for (int i = 0; i < LEN; i++) begin
        msg = 8'((31 * i + 5) & 255);
        msg_valid = 1'b1;
        msg_last = (i == LEN - 1);
        while (!msg_ready) @(negedge clk);
        @(negedge clk);
      end
    msg_valid = 1'b0;
    msg_last = 1'b0;
    repeat (8) @(negedge clk);
    checks += 2;
    if (ndig != NMSG) begin
      failures++;
      $display("FAIL %0d digests", ndig);
    end
    // t_last is the clock edge that took the last byte; the first byte was
    // taken on edge t_first.
    if (t_last - t_first + 1 != NMSG * (LEN + 1) - 1) begin
      failures++;
      $display("FAIL %0d clocks for %0d messages", t_last - t_first + 1, NMSG);
    end
    mbps = real'(NMSG * LEN * 8) / real'(NMSG * (LEN + 1)) * 100.0;
    $display("MD5: %0d bytes in %0d clocks, %0.1f Mbit/s at 100 MHz",
             NMSG * LEN, t_last - t_first + 1, mbps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
