// md5_buffer_far: first stage of the MD5 input double buffer, where message
// bytes are collected and the padding is written.
//
// On a cycle with buf_far_ld high the buffer is written according to padtype:
//   PAD_NONE     byte count64 <= msg
//   PAD_ONE_LEN  byte count64 <= 0x80, later bytes <= 0, bytes 56..63 <= length
//   PAD_ONE      byte count64 <= 0x80, later bytes <= 0
//   PAD_LEN      bytes from count64 on <= 0, bytes 56..63 <= length
// The length field is the message length in bits, i.e. the byte count
// msgsizeout shifted left by three, stored little-endian as MD5 requires.
// Bytes below count64 are never touched by padding. The buffer is read as a
// whole (buffer_far_out) by the second stage while it is already collecting
// the next block, which is what hides the loading time.
// Timing: one write per clock; contents have no reset (every byte is written
// before it is used).
//
// The two-stage buffer, its name and its inputs (msg, count64, msgsizeout,
// padtype) follow the original block diagram; writing the whole padding in
// one clock is this implementation's choice.
module md5_buffer_far
  import md5_pkg::*;
(
  input  logic       clk,
  input  logic       buf_far_ld,
  input  logic [7:0] msg,
  input  logic [5:0] count64,
  input  logic [60:0] msgsizeout,
  input  md5_pad_t   padtype,
  output md5_block_t buffer_far_out
);

  md5_block_t       buf_q;
  logic [63:0]      bitlen;

  assign bitlen = {msgsizeout, 3'b000};
  assign buffer_far_out = buf_q;

  always_ff @(posedge clk) begin
    if (buf_far_ld) begin
      if (padtype == PAD_NONE) begin
        buf_q[count64] <= msg;
      end else begin
        for (int i = 0; i < 64; i++) begin
          if (i >= int'(count64)) begin
            if (i == int'(count64) && (padtype == PAD_ONE_LEN || padtype == PAD_ONE))
              buf_q[i] <= 8'h80;
            else if (i >= 56 && (padtype == PAD_ONE_LEN || padtype == PAD_LEN))
              buf_q[i] <= bitlen[8*(i-56) +: 8];
            else
              buf_q[i] <= 8'h00;
          end
        end
      end
    end
  end

endmodule
