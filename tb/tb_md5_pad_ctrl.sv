// tb_md5_pad_ctrl: self-checking test of the MD5 padding controller.
//
// For messages of several lengths it checks, from the strobes alone: one
// plain byte write per message byte at the right position, the padding
// writes (type, position and byte count) each length calls for, the number
// of blocks handed to the second buffer stage (ceil((len + 9) / 64)), that
// every such hand-over is followed one clock later by a chaining-register
// load, and that exactly the last of those loads carries digest_ld/cv_init.
module tb_md5_pad_ctrl;
  import md5_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        msg_valid, msg_last, msg_ready;
  logic        buf_far_ld, buf_clo_ld, cvreg_ld, digest_ld, cv_init;
  logic [5:0]  count64;
  logic [60:0] msgsizeout;
  md5_pad_t    padtype;
  int          checks = 0, failures = 0;
  always #5 clk = ~clk;

  md5_pad_ctrl dut (.*);

  // Strobe log of the current message.
  int n_bytes, n_bad_pos, n_clo, n_cv, n_dig, n_cvinit, n_late;
  md5_pad_t pads [$];
  int       pad_pos [$];
  logic [60:0] pad_len [$];
  logic     clo_prev;

  always @(posedge clk) if (rst_n) begin
    clo_prev <= buf_clo_ld;
    if (buf_far_ld && padtype == PAD_NONE) begin
      if (int'(count64) != n_bytes % 64) n_bad_pos++;
      n_bytes++;
    end
    if (buf_far_ld && padtype != PAD_NONE) begin
      pads.push_back(padtype);
      pad_pos.push_back(int'(count64));
      pad_len.push_back(msgsizeout);
    end
    if (buf_clo_ld) n_clo++;
    if (cvreg_ld) n_cv++;
    if (cvreg_ld != clo_prev) n_late++;
    if (digest_ld) n_dig++;
    if (cv_init) n_cvinit++;
  end

  task automatic run(input int len);
    int nblk, tail;
    n_bytes = 0; n_bad_pos = 0; n_clo = 0; n_cv = 0; n_dig = 0; n_cvinit = 0; n_late = 0;
    pads.delete(); pad_pos.delete(); pad_len.delete();
    for (int i = 0; i < len; i++) begin
      msg_valid = 1'b1;
      msg_last  = (i == len - 1);
      while (!msg_ready) @(negedge clk);
      @(negedge clk);
    end
    msg_valid = 1'b0;
    msg_last  = 1'b0;
    repeat (6) @(negedge clk);
    tail = len % 64;
    nblk = (len + 9 + 63) / 64;
    checks += 6;
    if (n_bytes != len || n_bad_pos != 0) begin
      failures++; $display("FAIL len %0d: %0d byte writes, %0d misplaced", len, n_bytes, n_bad_pos);
    end
    if (n_clo != nblk || n_cv != nblk) begin
      failures++; $display("FAIL len %0d: %0d/%0d blocks, expected %0d", len, n_clo, n_cv, nblk);
    end
    if (n_late != 0) begin
      failures++; $display("FAIL len %0d: chaining load not one clock after hand-over", len);
    end
    if (n_dig != 1 || n_cvinit != 1) begin
      failures++; $display("FAIL len %0d: %0d digest loads", len, n_dig);
    end
    if (tail <= 55) begin
      if (pads.size() != 1 || pads[0] != PAD_ONE_LEN || pad_pos[0] != tail || pad_len[0] != 61'(len)) begin
        failures++; $display("FAIL len %0d: wrong single padding write", len);
      end
    end else begin
      if (pads.size() != 2 || pads[0] != PAD_ONE || pad_pos[0] != tail || pads[1] != PAD_LEN ||
          pad_pos[1] != 0 || pad_len[1] != 61'(len)) begin
        failures++; $display("FAIL len %0d: wrong two-block padding", len);
      end
    end
    if (msg_ready !== 1'b1) begin
      failures++; $display("FAIL len %0d: not ready afterwards", len);
    end
  endtask

  initial begin
    rst_n = 1'b0; msg_valid = 1'b0; msg_last = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (lens[i]) run(lens[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int lens [] = '{1, 2, 55, 56, 57, 63, 64, 65, 119, 120, 128, 191, 300};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
