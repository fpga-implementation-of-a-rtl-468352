// md5_cvreg: the 128-bit MD5 chaining-variable register (cvreg128bit).
//
// Reset, and the cv_init strobe, load the MD5 initial value {D,C,B,A} =
// {10325476, 98badcfe, efcdab89, 67452301}. cvreg_ld loads incvreg, the output
// of the compression core. cv_init wins over cvreg_ld: the controller raises
// both on the last block of a message so that the register is ready for the
// next message on the following cycle.
// Timing: registered, active-low asynchronous reset.
//
// The register, its names and its reset to the initial value follow the
// original block diagram; the cv_init strobe is this implementation's own.
module md5_cvreg
  import md5_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cvreg_ld,
  input  logic    cv_init,
  input  md5_cv_t incvreg,
  output md5_cv_t outcvreg
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         outcvreg <= MD5_IV;
    else if (cv_init)   outcvreg <= MD5_IV;
    else if (cvreg_ld)  outcvreg <= incvreg;

endmodule
