// md5_digest_reg: the four 32-bit digest output registers A, B, C and D.
//
// On digest_ld the chaining value produced for the last block of a message
// (mainout, {D,C,B,A}) is split into aout..dout, which then hold the digest
// until the next message finishes. digest_valid pulses for one clock with the
// new value. The digest bytes, in order, are aout[7:0], aout[15:8], ...,
// dout[31:24].
// Timing: registered, active-low asynchronous reset to zero.
//
// The four 32-bit registers and digest_ld follow the original block
// diagram; digest_valid is this implementation's own.
module md5_digest_reg
  import md5_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        digest_ld,
  input  md5_cv_t     mainout,
  output logic [31:0] aout,
  output logic [31:0] bout,
  output logic [31:0] cout,
  output logic [31:0] dout,
  output logic        digest_valid
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      {dout, cout, bout, aout} <= '0;
      digest_valid <= 1'b0;
    end else begin
      digest_valid <= digest_ld;
      if (digest_ld) {dout, cout, bout, aout} <= mainout;
    end

endmodule
