// md5_pad_ctrl: byte counting, padding decisions and load strobes of the MD5
// engine.
//
// Message bytes arrive one per clock on a valid/ready handshake; msg_last
// (LASTBYTE) marks the final byte of a message (messages hold at least one
// byte). The controller keeps the byte position in the block (count64) and the
// message length in bytes (msgsizeout, 61 bits; the buffer shifts it left by
// three to form the 64-bit bit length). After the last byte it stops the input
// for one or two clocks and writes the padding:
//   * last block holds 0..55 bytes: one PAD_ONE_LEN write, one final block;
//   * last block holds 56..63 bytes: PAD_ONE, then an extra all-zero block
//     ending in the length (PAD_LEN);
//   * a message that ends exactly on a block boundary gets an extra block
//     written with PAD_ONE_LEN from byte 0.
// Strobes: buf_far_ld writes the first buffer stage; buf_clo_ld (one clock
// after a block is complete in the first stage) copies it into the second;
// cvreg_ld (one clock later) stores the core's result in the chaining register;
// on a message's final block digest_ld and cv_init accompany cvreg_ld.
// A new message may start the clock after the last padding write, while the
// previous block is still being hashed (double buffering).
//
// The signal names and widths follow the original block diagram and the
// padding rule is standard MD5; the handshake, the state machine and the
// padtype encoding are this implementation's choices.
module md5_pad_ctrl
  import md5_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        msg_valid,
  input  logic        msg_last,
  output logic        msg_ready,
  output logic        buf_far_ld,
  output logic [5:0]  count64,
  output logic [60:0] msgsizeout,
  output md5_pad_t    padtype,
  output logic        buf_clo_ld,
  output logic        cvreg_ld,
  output logic        digest_ld,
  output logic        cv_init
);

  typedef enum logic [1:0] {S_MSG, S_PAD1, S_PAD2} state_t;

  state_t      state;
  logic [5:0]  pos;
  logic [60:0] nbytes;
  logic        clo_final;   // block loaded by buf_clo_ld is a message's last
  logic        cv_final;    // block being stored by cvreg_ld is a message's last
  logic        accept;

  assign msg_ready = (state == S_MSG);
  assign accept    = msg_valid && msg_ready;
  assign msgsizeout = nbytes;
  assign digest_ld = cvreg_ld && cv_final;
  assign cv_init   = digest_ld;

  always_comb begin
    buf_far_ld = 1'b0;
    count64    = pos;
    padtype    = PAD_NONE;
    case (state)
      S_MSG:  buf_far_ld = accept;
      S_PAD1: begin
        buf_far_ld = 1'b1;
        padtype    = (pos <= 6'd55) ? PAD_ONE_LEN : PAD_ONE;
      end
      S_PAD2: begin
        buf_far_ld = 1'b1;
        count64    = '0;
        padtype    = PAD_LEN;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state      <= S_MSG;
      pos        <= '0;
      nbytes     <= '0;
      buf_clo_ld <= 1'b0;
      clo_final  <= 1'b0;
      cvreg_ld   <= 1'b0;
      cv_final   <= 1'b0;
    end else begin
      cvreg_ld   <= buf_clo_ld;
      cv_final   <= clo_final;
      buf_clo_ld <= 1'b0;
      clo_final  <= 1'b0;
      case (state)
        S_MSG: if (accept) begin
          pos    <= pos + 6'd1;
          nbytes <= nbytes + 61'd1;
          if (pos == 6'd63) buf_clo_ld <= 1'b1;   // block full
          if (msg_last) state <= S_PAD1;
        end
        S_PAD1: begin
          buf_clo_ld <= 1'b1;
          if (pos <= 6'd55) begin
            clo_final <= 1'b1;
            state     <= S_MSG;
            pos       <= '0;
            nbytes    <= '0;
          end else begin
            state <= S_PAD2;
          end
        end
        S_PAD2: begin
          buf_clo_ld <= 1'b1;
          clo_final  <= 1'b1;
          state      <= S_MSG;
          pos        <= '0;
          nbytes     <= '0;
        end
        default: state <= S_MSG;
      endcase
    end

  // The chaining register always takes the core's result one clock after a
  // block reaches the second stage, and padding is never written while a
  // message byte could be accepted.
  assert property (@(posedge clk) disable iff (!rst_n) buf_clo_ld |=> cvreg_ld);
  assert property (@(posedge clk) disable iff (!rst_n) !(buf_far_ld && padtype != PAD_NONE && msg_ready));

endmodule
