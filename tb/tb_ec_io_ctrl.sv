// tb_ec_io_ctrl: self-checking test of the EC host interface with the default
// 193-bit scalar multiplier behind it.
//
// Writes k, Px, Py and a as seven 32-bit words each, reads them back (bits
// above bit 192 must read as zero), starts the multiplication, checks that
// operand writes are ignored while busy, waits for irq, reads the status word
// and the result and compares it with the ec_ref_pkg reference.
module tb_ec_io_ctrl;
  import ec_ref_pkg::*;

  localparam int M = 193;
  localparam int NW = 7;
  localparam logic [256:0] POLY_R = (257'd1 << 193) | (257'd1 << 15) | 257'd1;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        wr_en;
  logic [5:0]  addr;
  logic [31:0] wdata, rdata;
  logic        irq;
  int          checks = 0, failures = 0;
  always #5 clk = ~clk;

  ec_io_ctrl dut (.*);

  task automatic wr(input int r, input int w, input logic [31:0] d);
    @(negedge clk);
    wr_en = 1'b1; addr = 6'(r * 8 + w); wdata = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic rd(input int r, input int w, output logic [31:0] d);
    @(negedge clk);
    addr = 6'(r * 8 + w);
    #1 d = rdata;
  endtask

  task automatic wr_fe(input int r, input fe_t v);
    for (int w = 0; w < NW; w++) wr(r, w, v[32*w +: 32]);
  endtask

  task automatic rd_fe(input int r, output fe_t v);
    logic [31:0] d;
    v = '0;
    for (int w = 0; w < NW; w++) begin
      rd(r, w, d);
      v[32*w +: 32] = d;
    end
  endtask

  initial begin
    fe_t   k, a, b, v, qx, qy;
    pt_t   p, e;
    logic [31:0] st;
    int    cyc;
    rst_n = 1'b0; wr_en = 1'b0; addr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    p.inf = 1'b0;
    p.x = rnd_fe(M); p.y = rnd_fe(M); a = rnd_fe(M); k = rnd_fe(M);
    b = curve_b(p.x, p.y, a, M, POLY_R);
    e = pmul(k, p, a, M, POLY_R);
    // Write with garbage above bit 192, which must not read back.
    wr_fe(0, k | (256'hffff << 200));
    wr_fe(1, p.x | (256'h1 << 193));
    wr_fe(2, p.y);
    wr_fe(3, a);
    rd_fe(0, v); checks++; if (v !== k)   begin failures++; $display("FAIL k readback %h", v); end
    rd_fe(1, v); checks++; if (v !== p.x) begin failures++; $display("FAIL Px readback %h", v); end
    rd_fe(2, v); checks++; if (v !== p.y) begin failures++; $display("FAIL Py readback"); end
    rd_fe(3, v); checks++; if (v !== a)   begin failures++; $display("FAIL a readback"); end
    wr(6, 0, 32'h1);
    rd(6, 0, st); checks++; if (st[0] !== 1'b1) begin failures++; $display("FAIL not busy %h", st); end
    wr(0, 0, 32'hdeadbeef);   // ignored while busy
    rd(0, 0, st); checks++; if (st !== k[31:0]) begin failures++; $display("FAIL write while busy"); end
    cyc = 0;
    while (!irq) begin
      @(negedge clk);
      cyc++;
    end
    $display("scalar multiplication took %0d clocks", cyc);
    rd(6, 0, st);
    checks++;
    if (st[2:0] !== {e.inf, 1'b1, 1'b0}) begin failures++; $display("FAIL status %h", st); end
    rd_fe(4, qx); checks++; if (qx !== e.x) begin failures++; $display("FAIL Qx %h expected %h", qx, e.x); end
    rd_fe(5, qy); checks++; if (qy !== e.y) begin failures++; $display("FAIL Qy %h expected %h", qy, e.y); end
    checks++;
    if (!e.inf && curve_b(qx, qy, a, M, POLY_R) != b) begin
      failures++;
      $display("FAIL result not on the curve");
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
