// ec_point_mult: elliptic-curve scalar multiplication Q = k*P over GF(2^m)
// by the double-and-add method (point multiplication control).
//
// The scalar is scanned from its most significant bit: for every bit Q is
// doubled, and when the bit is one P is added. Doubling and addition are run
// by ec_double_fsm and ec_add_fsm, which share one gf2m_alu, so only one field
// operation is in flight at any time. This controller handles the cases the
// affine formulas do not cover:
//   * Q at infinity: doubling leaves it there, adding P gives P;
//   * doubling a point with x = 0 gives infinity;
//   * adding P to Q with Qx = Px gives 2P when Qy = Py, else infinity.
// P itself must be a finite point. k, P and a are captured on start.
// Interface: start/busy/done; qx, qy, q_inf hold the result from done until
// the next start. Timing: per scalar bit one clock, plus a doubling when Q is
// finite, plus an addition when the bit is one.
//
// Double-and-add follows the original; the scan direction and the handling
// of the special cases are this implementation's choices.
module ec_point_mult
  import gf2m_pkg::*;
#(
  parameter int unsigned M    = GF_M,
  parameter logic [M:0]  POLY = (M+1)'(GF_POLY)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic [M-1:0] px,
  input  logic [M-1:0] py,
  input  logic [M-1:0] a_coef,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] qx,
  output logic [M-1:0] qy,
  output logic         q_inf
);

  typedef enum logic [2:0] {
    S_IDLE, S_DBL_CHK, S_DBL_WAIT, S_ADD_CHK, S_ADD_WAIT, S_SAME_WAIT, S_NEXT
  } state_t;

  state_t       state;
  logic [M-1:0] k_q, px_q, py_q, a_q;
  logic [$clog2(M)-1:0] idx;

  // Field operator and the two point-operation sequencers.
  logic         alu_start, alu_busy, alu_done;
  gf_op_t       alu_op;
  logic [M-1:0] alu_a, alu_b, alu_res;

  logic         dbl_start, dbl_busy, dbl_done, dbl_alu_start;
  gf_op_t       dbl_alu_op;
  logic [M-1:0] dbl_x3, dbl_y3, dbl_alu_a, dbl_alu_b;

  logic         add_start, add_busy, add_done, add_alu_start;
  gf_op_t       add_alu_op;
  logic [M-1:0] add_x3, add_y3, add_alu_a, add_alu_b;

  gf2m_alu #(.M(M), .POLY(POLY)) u_alu (
    .clk, .rst_n, .start(alu_start), .op(alu_op), .opa(alu_a), .opb(alu_b),
    .busy(alu_busy), .done(alu_done), .result(alu_res)
  );

  ec_double_fsm #(.M(M)) u_dbl (
    .clk, .rst_n, .start(dbl_start), .x1(qx), .y1(qy), .a_coef(a_q),
    .busy(dbl_busy), .done(dbl_done), .x3(dbl_x3), .y3(dbl_y3),
    .alu_start(dbl_alu_start), .alu_op(dbl_alu_op), .alu_a(dbl_alu_a),
    .alu_b(dbl_alu_b), .alu_done, .alu_res
  );

  ec_add_fsm #(.M(M)) u_add (
    .clk, .rst_n, .start(add_start), .x1(qx), .y1(qy), .x2(px_q), .y2(py_q),
    .a_coef(a_q), .busy(add_busy), .done(add_done), .x3(add_x3), .y3(add_y3),
    .alu_start(add_alu_start), .alu_op(add_alu_op), .alu_a(add_alu_a),
    .alu_b(add_alu_b), .alu_done, .alu_res
  );

  // Only one sequencer runs at a time; it owns the operator.
  assign alu_start = dbl_alu_start | add_alu_start;
  assign alu_op    = dbl_busy ? dbl_alu_op : add_alu_op;
  assign alu_a     = dbl_busy ? dbl_alu_a  : add_alu_a;
  assign alu_b     = dbl_busy ? dbl_alu_b  : add_alu_b;

  assign busy = (state != S_IDLE);

  always_comb begin
    dbl_start = 1'b0;
    add_start = 1'b0;
    if (state == S_DBL_CHK && !q_inf && qx != '0) dbl_start = 1'b1;
    if (state == S_ADD_CHK && k_q[idx] && !q_inf) begin
      if (qx != px_q)                     add_start = 1'b1;
      else if (qy == py_q && px_q != '0)  dbl_start = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      k_q   <= '0;
      px_q  <= '0;
      py_q  <= '0;
      a_q   <= '0;
      idx   <= '0;
      qx    <= '0;
      qy    <= '0;
      q_inf <= 1'b1;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          k_q   <= k;
          px_q  <= px;
          py_q  <= py;
          a_q   <= a_coef;
          idx   <= ($clog2(M))'(M - 1);
          q_inf <= 1'b1;
          qx    <= '0;
          qy    <= '0;
          state <= S_DBL_CHK;
        end
        S_DBL_CHK: begin
          if (q_inf)          state <= S_ADD_CHK;
          else if (qx == '0) begin
            q_inf <= 1'b1;
            state <= S_ADD_CHK;
          end else            state <= S_DBL_WAIT;
        end
        S_DBL_WAIT: if (dbl_done) begin
          qx    <= dbl_x3;
          qy    <= dbl_y3;
          state <= S_ADD_CHK;
        end
        S_ADD_CHK: begin
          state <= S_NEXT;
          if (k_q[idx]) begin
            if (q_inf) begin
              qx    <= px_q;
              qy    <= py_q;
              q_inf <= 1'b0;
            end else if (qx != px_q) begin
              state <= S_ADD_WAIT;
            end else if (qy == py_q && px_q != '0) begin
              state <= S_SAME_WAIT;
            end else begin
              q_inf <= 1'b1;          // Q = -P, or 2P with Px = 0
            end
          end
        end
        S_ADD_WAIT: if (add_done) begin
          qx    <= add_x3;
          qy    <= add_y3;
          state <= S_NEXT;
        end
        S_SAME_WAIT: if (dbl_done) begin
          qx    <= dbl_x3;
          qy    <= dbl_y3;
          state <= S_NEXT;
        end
        S_NEXT: begin
          if (idx == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            idx   <= idx - 1'b1;
            state <= S_DBL_CHK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end

  assert property (@(posedge clk) disable iff (!rst_n) !(dbl_busy && add_busy));
  assert property (@(posedge clk) disable iff (!rst_n) alu_start |-> !alu_busy);

endmodule
