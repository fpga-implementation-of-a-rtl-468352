// tb_md5_hash: self-checking test of the MD5 engine.
//
// Streams messages of many lengths (covering every padding case: short tail,
// tail of 56..63 bytes needing an extra block, exact block multiples, and
// several blocks) back to back, byte i of message n being (13*i + 7*n + 1)
// mod 256, plus the text messages "abc", "a" and the "quick brown fox"
// sentence. Expected digests are the standard MD5 values of these messages,
// packed as {D,C,B,A}. Also checks the latency from the last byte to
// digest_valid (4 clocks, 5 when an extra padding block is needed) and that
// a 64-byte block is taken in 64 clocks without stalls.
module tb_md5_hash;
  import md5_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [7:0]  msg;
  logic        msg_valid, msg_last, msg_ready;
  logic [31:0] aout, bout, cout, dout;
  logic        digest_valid;
  int          checks = 0, failures = 0;
  int          cycle = 0;

  md5_hash dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int NGEN = 14;
  int          gen_len [NGEN] = '{1, 3, 55, 56, 60, 63, 64, 65, 119, 120, 127, 128, 129, 200};
  logic [127:0] gen_dig [NGEN] = '{
    128'h41dfc129260d21aa89a51bad0840a555, 128'h983172b20e3012a86b3fd5a132e81477,
    128'h5823d0e182719a2bf9f02a056816fba2, 128'h9f703427b87a3078c59b7cb7cef1094f,
    128'ha402e0fd0b0d6080788690d7634fb202, 128'h8602ace9f2311ed8b3d90e83458bf298,
    128'hacdb639d1a530c9f469990f4e50428d9, 128'hbf628eb5a50dcbd77a5bb738c13548e7,
    128'hcfebdb798578867580dd041d71f22123, 128'h13f83e13590f4bba67d999fff4775717,
    128'h419c5d875ef403c8819267e353b00196, 128'h99d181179702d335295609cfe3d93f7e,
    128'hfeff3fd8f918c445ac73251075a59b45, 128'he8ae3ace5458d5476f1b8f73954cdf4a};

  // Expected digests in order of completion, and the expected completion time.
  logic [127:0] exp_q [$];
  int           exp_t [$];
  int           got = 0;
  int           stalls = 0;

  // Inputs change on the falling edge; a byte is taken on a rising edge where
  // msg_valid and msg_ready are both high.
  task automatic send(input byte unsigned data [], input bit back_to_back);
    for (int i = 0; i < data.size(); i++) begin
      msg       = data[i];
      msg_valid = 1'b1;
      msg_last  = (i == data.size() - 1);
      while (!msg_ready) begin
        stalls++;
        @(negedge clk);
      end
      @(negedge clk);
    end
    msg_valid = 1'b0;
    msg_last  = 1'b0;
    exp_t.push_back(((data.size() % 64) >= 56) ? 5 : 4);
    if (!back_to_back) @(negedge clk);
  endtask

  int last_q [$];
  always @(posedge clk) if (msg_valid && msg_ready && msg_last) last_q.push_back(cycle);

  // Check digests as they come out.
  always @(posedge clk) if (digest_valid) begin
    logic [127:0] e;
    int t, last_t;
    e = exp_q.pop_front();
    t = exp_t.pop_front();
    last_t = last_q.pop_front();
    checks += 2;
    got++;
    if ({dout, cout, bout, aout} !== e) begin
      failures++;
      $display("FAIL digest %0d: got %h expected %h", got, {dout, cout, bout, aout}, e);
    end
    if (cycle - last_t != t) begin
      failures++;
      $display("FAIL digest %0d latency: %0d expected %0d", got, cycle - last_t, t);
    end
  end

  function automatic void text(input string s, output byte unsigned d []);
    d = new[s.len()];
    foreach (d[i]) d[i] = s[i];
  endfunction

  initial begin
    byte unsigned d [];
    int t0;
    rst_n = 1'b0; msg = '0; msg_valid = 1'b0; msg_last = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < NGEN; n++) begin
      d = new[gen_len[n]];
      foreach (d[i]) d[i] = 8'((13 * i + 7 * n + 1) & 255);
      exp_q.push_back(gen_dig[n]);
      send(d, n % 2 == 1);   // every other message starts right after the last
    end
    text("abc", d);
    exp_q.push_back(128'h727fe1287d3f96d6b04fd23c98500190);
    send(d, 1'b0);
    text("a", d);
    exp_q.push_back(128'h61267769e299c331a8b6f1c0b975c10c);
    send(d, 1'b1);
    text("The quick brown fox jumps over the lazy dog", d);
    exp_q.push_back(128'hd619a442351dd86b82b62b379d7d109e);
    send(d, 1'b0);
    // Throughput: 128 bytes with no stall inside the message.
    d = new[128];
    foreach (d[i]) d[i] = 8'((13 * i + 7 * 11 + 1) & 255);
    exp_q.push_back(gen_dig[11]);
    stalls = 0;
    t0 = cycle;
    send(d, 1'b1);
    checks++;
    if (cycle - t0 != 128 || stalls != 0) begin
      failures++;
      $display("FAIL 128 bytes took %0d clocks, %0d stalls", cycle - t0, stalls);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (got != NGEN + 4) begin
      failures++;
      $display("FAIL %0d digests seen, expected %0d", got, NGEN + 4);
    end
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
