// crypto_accel_top: IPsec authentication accelerator with two independent
// engines side by side.
//
//  * MD5 hash engine (md5_hash): computes the 128-bit message digest used
//    for message authentication codes; messages stream in one byte per clock.
//  * Elliptic-curve public-key generator (ec_io_ctrl and below): computes
//    Q = k*P on y^2 + xy = x^3 + ax^2 + b over GF(2^m), m = 193 by default,
//    the public-key operation used for digital signatures.
// The engines share only clock and reset; each has its own ports and can run
// at the same time as the other. Combining the two (for instance encrypting a
// digest with a key) is left to the host.
// Parameters: EC_M and EC_POLY select the binary field of the EC engine.
module crypto_accel_top
  import gf2m_pkg::*;
#(
  parameter int unsigned   EC_M    = GF_M,
  parameter logic [EC_M:0] EC_POLY = (EC_M+1)'(GF_POLY)
) (
  input  logic        clk,
  input  logic        rst_n,
  // MD5 message stream and digest
  input  logic [7:0]  md5_msg,
  input  logic        md5_valid,
  input  logic        md5_last,
  output logic        md5_ready,
  output logic [31:0] md5_aout,
  output logic [31:0] md5_bout,
  output logic [31:0] md5_cout,
  output logic [31:0] md5_dout,
  output logic        md5_digest_valid,
  // EC scalar multiplier register port
  input  logic        ec_wr_en,
  input  logic [5:0]  ec_addr,
  input  logic [31:0] ec_wdata,
  output logic [31:0] ec_rdata,
  output logic        ec_irq
);

  md5_hash u_md5 (
    .clk, .rst_n, .msg(md5_msg), .msg_valid(md5_valid), .msg_last(md5_last),
    .msg_ready(md5_ready), .aout(md5_aout), .bout(md5_bout), .cout(md5_cout),
    .dout(md5_dout), .digest_valid(md5_digest_valid)
  );

  ec_io_ctrl #(.M(EC_M), .POLY(EC_POLY)) u_ec (
    .clk, .rst_n, .wr_en(ec_wr_en), .addr(ec_addr), .wdata(ec_wdata),
    .rdata(ec_rdata), .irq(ec_irq)
  );

endmodule
