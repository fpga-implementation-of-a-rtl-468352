// ec_io_ctrl: host interface (I/O control) of the elliptic-curve scalar
// multiplier, which sits above the point multiplication control.
//
// The host moves the m-bit operands and results as 32-bit words over a simple
// synchronous register port. addr = {reg[2:0], word[2:0]}, word 0 being the
// least significant 32 bits of an operand:
//   reg 0  k        scalar                       read/write
//   reg 1  Px       base point x                 read/write
//   reg 2  Py       base point y                 read/write
//   reg 3  a        curve coefficient a          read/write
//   reg 4  Qx       result x                     read only
//   reg 5  Qy       result y                     read only
//   reg 6  control  write word 0 bit 0 = start;  read word 0 =
//                   {29'b0, q_inf, done, busy}   (done stays set until the
//                   next start)
// Bits above m read as zero. Writes to operands are ignored while busy. irq
// pulses for one clock when a scalar multiplication ends.
// Timing: writes take effect at the clock edge; rdata is combinational from
// addr. m may be at most 256 (eight words).
//
// The original only names an I/O control level above the point
// multiplication control; the register map is this implementation's own.
module ec_io_ctrl
  import gf2m_pkg::*;
#(
  parameter int unsigned M    = GF_M,
  parameter logic [M:0]  POLY = (M+1)'(GF_POLY)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [5:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        irq
);

  localparam int unsigned NW = (M + 31) / 32;

  logic [NW*32-1:0] k_q, px_q, py_q, a_q;
  logic [NW*32-1:0] qx_w, qy_w;
  logic [M-1:0]     qx, qy;
  logic             pm_start, pm_busy, pm_done, q_inf, done_flag;
  logic [2:0]       sel, word;

  assign sel  = addr[5:3];
  assign word = addr[2:0];
  assign qx_w = (NW*32)'(qx);
  assign qy_w = (NW*32)'(qy);
  assign pm_start = wr_en && sel == 3'd6 && word == 3'd0 && wdata[0] && !pm_busy;
  assign irq = pm_done;

  ec_point_mult #(.M(M), .POLY(POLY)) u_pm (
    .clk, .rst_n, .start(pm_start),
    .k(k_q[M-1:0]), .px(px_q[M-1:0]), .py(py_q[M-1:0]), .a_coef(a_q[M-1:0]),
    .busy(pm_busy), .done(pm_done), .qx, .qy, .q_inf
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      k_q       <= '0;
      px_q      <= '0;
      py_q      <= '0;
      a_q       <= '0;
      done_flag <= 1'b0;
    end else begin
      if (pm_start)     done_flag <= 1'b0;
      else if (pm_done) done_flag <= 1'b1;
      if (wr_en && !pm_busy && int'(word) < NW) begin
        case (sel)
          3'd0: k_q [32*word +: 32] <= wdata;
          3'd1: px_q[32*word +: 32] <= wdata;
          3'd2: py_q[32*word +: 32] <= wdata;
          3'd3: a_q [32*word +: 32] <= wdata;
          default: ;
        endcase
      end
    end

  always_comb begin
    rdata = '0;
    if (int'(word) < NW) begin
      case (sel)
        3'd0: rdata = k_q [32*word +: 32] & word_mask(word);
        3'd1: rdata = px_q[32*word +: 32] & word_mask(word);
        3'd2: rdata = py_q[32*word +: 32] & word_mask(word);
        3'd3: rdata = a_q [32*word +: 32] & word_mask(word);
        3'd4: rdata = qx_w[32*word +: 32];
        3'd5: rdata = qy_w[32*word +: 32];
        3'd6: rdata = (word == 3'd0) ? {29'b0, q_inf, done_flag, pm_busy} : 32'b0;
        default: rdata = '0;
      endcase
    end
  end

  // Bits of word w that lie below m.
  function automatic logic [31:0] word_mask(input logic [2:0] w);
    for (int b = 0; b < 32; b++) word_mask[b] = (32 * int'(w) + b) < int'(M);
  endfunction

endmodule
