// tb_crypto_accel_top: end-to-end test of the accelerator, both engines at
// once.
//
// The EC engine is built over GF(2^8) (x^8 + x^4 + x^3 + x + 1) so that a
// sweep of scalars reaches every special case of the point arithmetic. While
// it runs, a second process streams MD5 messages through the hash engine.
// MD5 digests are the standard values for the generated messages; EC results
// are compared with the ec_ref_pkg reference and checked to lie on the curve.
// Every mechanism of the design is counted and must occur at least once:
//   MD5: one-block padding, extra padding block, padding block after an exact
//        block multiple, non-final blocks of multi-block messages, input stall during padding,
//        a new message entering while the previous block is still hashed;
//   EC:  point addition, doubling, first-bit copy of P, Q = P, Q = -P,
//        doubling of an x = 0 point, operand write refused while busy.
module tb_crypto_accel_top;
  import ec_ref_pkg::*;

  localparam int unsigned MS = 8;
  localparam logic [MS:0] PS = 9'h11b;
  localparam logic [256:0] POLY_R = 257'h11b;

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
  int          cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  crypto_accel_top #(.EC_M(MS), .EC_POLY(PS)) dut (.*);

  // ---------------- MD5 side ----------------
  localparam int NGEN = 14;
  int           gen_len [NGEN] = '{1, 3, 55, 56, 60, 63, 64, 65, 119, 120, 127, 128, 129, 200};
  logic [127:0] gen_dig [NGEN] = '{
    128'h41dfc129260d21aa89a51bad0840a555, 128'h983172b20e3012a86b3fd5a132e81477,
    128'h5823d0e182719a2bf9f02a056816fba2, 128'h9f703427b87a3078c59b7cb7cef1094f,
    128'ha402e0fd0b0d6080788690d7634fb202, 128'h8602ace9f2311ed8b3d90e83458bf298,
    128'hacdb639d1a530c9f469990f4e50428d9, 128'hbf628eb5a50dcbd77a5bb738c13548e7,
    128'hcfebdb798578867580dd041d71f22123, 128'h13f83e13590f4bba67d999fff4775717,
    128'h419c5d875ef403c8819267e353b00196, 128'h99d181179702d335295609cfe3d93f7e,
    128'hfeff3fd8f918c445ac73251075a59b45, 128'he8ae3ace5458d5476f1b8f73954cdf4a};
  logic [127:0] exp_q [$];
  int           n_digests = 0;
  int n_pad1 = 0, n_pad2 = 0, n_padb = 0, n_multi = 0, n_stall = 0, n_overlap = 0;
  bit           md5_finished = 0;

  always @(posedge clk) if (md5_digest_valid) begin
    logic [127:0] e;
    e = exp_q.pop_front();
    checks++;
    n_digests++;
    if ({md5_dout, md5_cout, md5_bout, md5_aout} !== e) begin
      failures++;
      $display("FAIL digest %0d: got %h expected %h", n_digests,
               {md5_dout, md5_cout, md5_bout, md5_aout}, e);
    end
  end

  // Mechanism probes on the hash engine.
  always @(posedge clk) if (rst_n) begin
    if (md5_valid && !md5_ready) n_stall++;
    if (dut.u_md5.u_ctrl.buf_far_ld) begin
      if (dut.u_md5.u_ctrl.padtype == md5_pkg::PAD_ONE) n_pad2++;
      if (dut.u_md5.u_ctrl.padtype == md5_pkg::PAD_ONE_LEN) begin
        if (dut.u_md5.u_ctrl.count64 == '0) n_padb++;
        else n_pad1++;
      end
    end
    if (dut.u_md5.u_ctrl.cvreg_ld && !dut.u_md5.u_ctrl.digest_ld) n_multi++;
    if (md5_valid && md5_ready && (dut.u_md5.u_ctrl.cvreg_ld || dut.u_md5.u_ctrl.buf_clo_ld))
      n_overlap++;
  end

  initial begin : md5_proc
    @(posedge rst_n);
    for (int n = 0; n < NGEN; n++) begin
      exp_q.push_back(gen_dig[n]);
      for (int i = 0; i < gen_len[n]; i++) begin
        @(negedge clk);
        md5_msg   = 8'((13 * i + 7 * n + 1) & 255);
        md5_valid = 1'b1;
        md5_last  = (i == gen_len[n] - 1);
        #1;
        while (!md5_ready) @(negedge clk);
      end
      @(negedge clk);
      md5_valid = 1'b0;
      md5_last  = 1'b0;
    end
    repeat (10) @(negedge clk);
    md5_finished = 1;
  end

  // ---------------- EC side ----------------
  int n_busy_refused = 0;

  task automatic bus_wr(input int r, input logic [31:0] d);
    @(negedge clk);
    ec_wr_en = 1'b1; ec_addr = 6'(r * 8); ec_wdata = d;
    @(negedge clk);
    ec_wr_en = 1'b0;
  endtask

  task automatic bus_rd(input int r, output logic [31:0] d);
    @(negedge clk);
    ec_addr = 6'(r * 8);
    #1 d = ec_rdata;
  endtask

  initial begin : ec_proc
    pt_t  p, q, e;
    fe_t  a, b;
    logic [31:0] d, st;
    rst_n = 1'b0;
    md5_msg = '0; md5_valid = 1'b0; md5_last = 1'b0;
    ec_wr_en = 1'b0; ec_addr = '0; ec_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3; c++) begin
      do begin
        p.inf = 1'b0;
        p.x = (c == 0) ? 256'd0 : rnd_fe(MS);
        p.y = rnd_fe(MS);
        a   = rnd_fe(MS);
        b   = curve_b(p.x, p.y, a, MS, POLY_R);
      end while (b == '0);
      bus_wr(1, p.x[31:0]);
      bus_wr(2, p.y[31:0]);
      bus_wr(3, a[31:0]);
      for (int kv = 0; kv < 256; kv += (c == 2) ? 1 : 7) begin
        bus_wr(0, 32'(kv));
        bus_wr(6, 32'h1);
        if (kv % 16 == 0) begin
          bus_wr(0, 32'hff);         // refused: engine busy
          bus_rd(0, d);
          if (d == 32'(kv)) n_busy_refused++;
          bus_wr(0, 32'(kv));
        end
        while (!ec_irq) @(negedge clk);
        bus_rd(6, st);
        q.inf = st[2];
        bus_rd(4, d); q.x = 256'(d);
        bus_rd(5, d); q.y = 256'(d);
        e = pmul(256'(kv), p, a, MS, POLY_R);
        checks++;
        if (st[1] !== 1'b1 || q.inf !== e.inf || (!e.inf && (q.x !== e.x || q.y !== e.y))) begin
          failures++;
          $display("FAIL EC curve %0d k=%0d: got %0b %h %h expected %0b %h %h",
                   c, kv, q.inf, q.x[7:0], q.y[7:0], e.inf, e.x[7:0], e.y[7:0]);
        end
        if (!q.inf) begin
          checks++;
          if (curve_b(q.x, q.y, a, MS, POLY_R) != b) begin
            failures++;
            $display("FAIL EC k=%0d: result not on the curve", kv);
          end
        end
      end
    end
    wait (md5_finished);
    check_counts();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Encodings of ec_point_mult's S_DBL_CHK and S_ADD_CHK states.
  localparam int PM_DBL_CHK = 1, PM_ADD_CHK = 3;
  int n_add = 0, n_dbl = 0, n_copy = 0, n_same = 0, n_neg = 0, n_zero = 0;
  always @(posedge clk) begin
    if (dut.u_ec.u_pm.u_add.done) n_add++;
    if (dut.u_ec.u_pm.u_dbl.done) n_dbl++;
    if (int'(dut.u_ec.u_pm.state) == PM_ADD_CHK && dut.u_ec.u_pm.k_q[dut.u_ec.u_pm.idx]) begin
      if (dut.u_ec.u_pm.q_inf) n_copy++;
      else if (dut.u_ec.u_pm.qx == dut.u_ec.u_pm.px_q && dut.u_ec.u_pm.qy == dut.u_ec.u_pm.py_q) n_same++;
      else if (dut.u_ec.u_pm.qx == dut.u_ec.u_pm.px_q) n_neg++;
    end
    if (int'(dut.u_ec.u_pm.state) == PM_DBL_CHK && !dut.u_ec.u_pm.q_inf &&
        dut.u_ec.u_pm.qx == '0) n_zero++;
  end

  task automatic check_counts();
    int cnt [13];
    string nm [13];
    cnt = '{n_pad1, n_pad2, n_padb, n_multi, n_stall, n_overlap, n_add, n_dbl, n_copy,
            n_same, n_neg, n_zero, n_busy_refused};
    nm  = '{"one-block padding", "extra padding block", "block-multiple padding",
            "non-final block hashed", "input stall", "overlapped loading", "EC addition",
            "EC doubling", "copy of P", "Q = P", "Q = -P", "x = 0 doubling",
            "write refused while busy"};
    for (int i = 0; i < 13; i++) begin
      $display("mechanism %-26s %0d", nm[i], cnt[i]);
      checks++;
      if (cnt[i] == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", nm[i]);
      end
    end
    checks++;
    if (n_digests != NGEN) begin
      failures++;
      $display("FAIL %0d digests, expected %0d", n_digests, NGEN);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
