// gf2m_pkg: operation codes of the combined GF(2^m) operator and the default
// field of the elliptic-curve scalar multiplier.
//
// The field size m = 193 is the one the accelerator was built for. The
// reduction polynomial is not fixed by the design; the default below is the
// trinomial x^193 + x^15 + 1 (the one of the standard 193-bit binary curves).
package gf2m_pkg;

  typedef enum logic [1:0] {
    GF_ADD = 2'd0,   // D = Z + B
    GF_MUL = 2'd1,   // D = Z * B mod f
    GF_SQR = 2'd2,   // D = Z * Z mod f
    GF_INV = 2'd3    // D = Z^-1 mod f (0 for Z = 0)
  } gf_op_t;

  localparam int unsigned GF_M = 193;
  localparam logic [GF_M:0] GF_POLY = (194'd1 << 193) | (194'd1 << 15) | 194'd1;

endpackage
