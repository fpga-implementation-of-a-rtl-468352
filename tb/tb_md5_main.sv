// tb_md5_main: self-checking test of the combinational 64-step MD5 core.
//
// Known answers: the single padded blocks of "abc" and of the empty message,
// compressed from the initial value, must give their standard MD5 digests.
// Random blocks and chaining values are compared with a rolled, step-by-step
// model in this testbench that computes its constants from sin() at run time.
module tb_md5_main;
  import md5_pkg::*;

  md5_cv_t    cv_in, mainout;
  md5_block_t block;
  int         checks = 0, failures = 0;

  md5_main dut (.*);

  int unsigned rot_tab [4][4] = '{'{7, 12, 17, 22}, '{5, 9, 14, 20}, '{4, 11, 16, 23}, '{6, 10, 15, 21}};

  function automatic md5_cv_t ref_compress(input md5_cv_t cv, input md5_block_t blk);
    logic [31:0] a, b, c, d, f, t, tmp;
    logic [31:0] x [16];
    int g;
    real s;
    for (int j = 0; j < 16; j++) x[j] = {blk[4*j+3], blk[4*j+2], blk[4*j+1], blk[4*j]};
    {d, c, b, a} = cv;
    for (int i = 0; i < 64; i++) begin
      if (i < 16)      begin f = (b & c) | (~b & d); g = i;                end
      else if (i < 32) begin f = (d & b) | (~d & c); g = (5*i + 1) % 16;   end
      else if (i < 48) begin f = b ^ c ^ d;          g = (3*i + 5) % 16;   end
      else             begin f = c ^ (b | ~d);       g = (7*i) % 16;       end
      s = $sin(real'(i + 1));
      if (s < 0.0) s = -s;
      t = 32'(longint'($floor(s * 4294967296.0)));
      tmp = a + f + t + x[g];
      tmp = (tmp << rot_tab[i/16][i%4]) | (tmp >> (32 - rot_tab[i/16][i%4]));
      a = d; d = c; c = b; b = b + tmp;
    end
    return {cv[127:96] + d, cv[95:64] + c, cv[63:32] + b, cv[31:0] + a};
  endfunction

  task automatic check(input md5_cv_t e, input string what);
    #1;
    checks++;
    if (mainout !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, mainout, e);
    end
  endtask

  initial begin
    cv_in = MD5_IV;
    block = '0;
    block[0] = "a"; block[1] = "b"; block[2] = "c"; block[3] = 8'h80; block[56] = 8'd24;
    check(128'h727fe1287d3f96d6b04fd23c98500190, "abc");
    block = '0;
    block[0] = 8'h80;
    check(128'h7e42f8ec980980e904b2008fd98c1dd4, "empty message");
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 16; i++) block[4*i +: 4] = $urandom;
      cv_in = {$urandom, $urandom, $urandom, $urandom};
      check(ref_compress(cv_in, block), $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
