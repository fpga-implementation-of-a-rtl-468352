// md5_hash: the MD5 hash engine, one byte of message per clock in, a 128-bit
// digest out.
//
// Data path (block diagram of the design): message bytes are written into the
// first buffer stage (md5_buffer_far), which also receives the padding and the
// length field. A full block is copied in one clock into the second stage
// (md5_buffer_close), which feeds the fully unrolled 64-step core (md5_main)
// together with the chaining register (md5_cvreg). One clock later the core's
// result is stored back in the chaining register, and for the last block of a
// message also in the digest registers (md5_digest_reg). md5_pad_ctrl makes
// all the strobes.
//
// Interface: msg/msg_valid/msg_ready/msg_last stream one message of one or more
// bytes, msg_last on its final byte; aout..dout hold the digest (A,B,C,D; the
// digest bytes in order are aout[7:0] first ... dout[31:24] last) and
// digest_valid pulses when they change.
// Timing: a 64-byte block is taken in 64 clocks; the digest appears 4 clocks
// after the last byte when no extra padding block is needed, 5 when one is.
//
// The structure follows the original block diagram; the byte-stream
// handshake is this implementation's choice. At one byte per clock the engine
// takes 512 bits per 64 clocks (800 Mbit/s at 100 MHz for long messages),
// somewhat more than the 500 Mbit/s reported for the original.
module md5_hash
  import md5_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  msg,
  input  logic        msg_valid,
  input  logic        msg_last,
  output logic        msg_ready,
  output logic [31:0] aout,
  output logic [31:0] bout,
  output logic [31:0] cout,
  output logic [31:0] dout,
  output logic        digest_valid
);

  logic        buf_far_ld, buf_clo_ld, cvreg_ld, digest_ld, cv_init;
  logic [5:0]  count64;
  logic [60:0] msgsizeout;
  md5_pad_t    padtype;
  md5_block_t  buffer_far_out, buffer_close_out;
  md5_cv_t     outcvreg, mainout;

  md5_pad_ctrl u_ctrl (
    .clk, .rst_n, .msg_valid, .msg_last, .msg_ready,
    .buf_far_ld, .count64, .msgsizeout, .padtype,
    .buf_clo_ld, .cvreg_ld, .digest_ld, .cv_init
  );

  md5_buffer_far u_far (
    .clk, .buf_far_ld, .msg, .count64, .msgsizeout, .padtype, .buffer_far_out
  );

  md5_buffer_close u_close (
    .clk, .buf_clo_ld, .buffer_far_out, .buffer_close_out
  );

  md5_cvreg u_cvreg (
    .clk, .rst_n, .cvreg_ld, .cv_init, .incvreg(mainout), .outcvreg
  );

  md5_main u_main (
    .cv_in(outcvreg), .block(buffer_close_out), .mainout
  );

  md5_digest_reg u_digest (
    .clk, .rst_n, .digest_ld, .mainout, .aout, .bout, .cout, .dout, .digest_valid
  );

endmodule
