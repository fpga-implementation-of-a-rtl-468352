// md5_buffer_close: second stage of the MD5 input double buffer.
//
// On buf_clo_ld it captures the whole 512-bit block assembled in the first
// stage and holds it steady at the input of the combinational 64-step core
// while the first stage is refilled with the next block. Because the copy is
// a single parallel load, filling the buffer never lies on the core's path.
// Timing: the block appears on buffer_close_out one clock after buf_clo_ld.
//
// The stage and its load strobe follow the original block diagram.
module md5_buffer_close
  import md5_pkg::*;
(
  input  logic       clk,
  input  logic       buf_clo_ld,
  input  md5_block_t buffer_far_out,
  output md5_block_t buffer_close_out
);

  always_ff @(posedge clk)
    if (buf_clo_ld) buffer_close_out <= buffer_far_out;

endmodule
