// md5_main: the MD5 compression function as one combinational block.
//
// All 64 steps are unrolled into a chain of adders and round functions, as in
// a full-loop-unrolled core. Every step rotates by a constant amount, so the
// rotation is only a re-ordering of wires and no barrel shifter exists. The
// 128-bit chaining value entering the block is added back at the end, so
// mainout is directly the next chaining value.
//
// Interface: cv_in is the chaining value {D,C,B,A}, block the 512-bit message
// block (byte 0 in bits [7:0]); mainout = cv_in + steps(cv_in, block).
// Timing: purely combinational, no clock.
//
// The unrolled 64-step core, the wired rotations and the name mainout follow
// the original accelerator; the round logic is standard MD5.
module md5_main
  import md5_pkg::*;
(
  input  md5_cv_t    cv_in,
  input  md5_block_t block,
  output md5_cv_t    mainout
);

  logic [31:0] a [65];
  logic [31:0] b [65];
  logic [31:0] c [65];
  logic [31:0] d [65];
  logic [15:0][31:0] words;

  assign words = block;
  assign a[0] = cv_in[31:0];
  assign b[0] = cv_in[63:32];
  assign c[0] = cv_in[95:64];
  assign d[0] = cv_in[127:96];

  for (genvar i = 0; i < 64; i++) begin : g_step
    localparam int unsigned R = md5_rot(i);
    localparam int unsigned W = md5_widx(i);
    logic [31:0] sum;
    assign sum = a[i] + md5_fun(i, b[i], c[i], d[i]) + MD5_T[i] + words[W];
    // Constant rotate: wiring only.
    assign b[i+1] = b[i] + {sum[31-R:0], sum[31:32-R]};
    assign a[i+1] = d[i];
    assign c[i+1] = b[i];
    assign d[i+1] = c[i];
  end

  assign mainout = {cv_in[127:96] + d[64], cv_in[95:64] + c[64],
                    cv_in[63:32]  + b[64], cv_in[31:0]  + a[64]};

endmodule
