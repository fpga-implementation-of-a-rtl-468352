// ec_double_fsm: point doubling on the binary curve y^2 + xy = x^3 + ax^2 + b
// in affine coordinates, by sequencing the combined GF(2^m) operator.
//
//   lambda = x1 + y1/x1,  x3 = lambda^2 + lambda + a,
//   y3 = x1^2 + (lambda + 1)*x3 = x1^2 + lambda*x3 + x3
// The ten field operations, one at a time (issue, then wait for done):
//   t1=1/x1  t1=y1*t1  L=x1+t1  t2=L^2  t2=t2+L  x3=t2+a
//   t2=L*x3  t2=t2+x3  t1=x1^2  y3=t1+t2
// The caller handles x1 = 0 (the result is the point at infinity) and keeps
// x1, y1 and a steady while busy. Each operation costs one issue clock plus
// the operator's own time: about 1 inversion + 4 multiplications of m clocks.
// Interface: start/busy/done with x3, y3 valid while done is high (and held
// until the next start); alu_* is the request/response port to gf2m_alu.
//
// A separate doubling sequencer follows the original hierarchy; affine
// coordinates and the operation order are this implementation's choices.
module ec_double_fsm
  import gf2m_pkg::*;
#(
  parameter int unsigned M = GF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] x1,
  input  logic [M-1:0] y1,
  input  logic [M-1:0] a_coef,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] x3,
  output logic [M-1:0] y3,
  output logic         alu_start,
  output gf_op_t       alu_op,
  output logic [M-1:0] alu_a,
  output logic [M-1:0] alu_b,
  input  logic         alu_done,
  input  logic [M-1:0] alu_res
);

  localparam logic [3:0] LAST = 4'd9;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;

  state_t       state;
  logic [3:0]   step;
  logic [M-1:0] t1, t2, lam;

  assign busy      = (state != S_IDLE);
  assign alu_start = (state == S_ISSUE);

  always_comb begin
    alu_op = GF_ADD;
    alu_a  = '0;
    alu_b  = '0;
    case (step)
      4'd0: begin alu_op = GF_INV; alu_a = x1;  end
      4'd1: begin alu_op = GF_MUL; alu_a = y1;  alu_b = t1;     end
      4'd2: begin alu_op = GF_ADD; alu_a = x1;  alu_b = t1;     end
      4'd3: begin alu_op = GF_SQR; alu_a = lam; end
      4'd4: begin alu_op = GF_ADD; alu_a = t2;  alu_b = lam;    end
      4'd5: begin alu_op = GF_ADD; alu_a = t2;  alu_b = a_coef; end
      4'd6: begin alu_op = GF_MUL; alu_a = lam; alu_b = x3;     end
      4'd7: begin alu_op = GF_ADD; alu_a = t2;  alu_b = x3;     end
      4'd8: begin alu_op = GF_SQR; alu_a = x1;  end
      default: begin alu_op = GF_ADD; alu_a = t1; alu_b = t2;   end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      done  <= 1'b0;
      t1    <= '0;
      t2    <= '0;
      lam   <= '0;
      x3    <= '0;
      y3    <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:  if (start) begin
          step  <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT:  if (alu_done) begin
          case (step)
            4'd0, 4'd1, 4'd8: t1  <= alu_res;
            4'd2:             lam <= alu_res;
            4'd3, 4'd4, 4'd6, 4'd7: t2 <= alu_res;
            4'd5:             x3  <= alu_res;
            default:          y3  <= alu_res;
          endcase
          if (step == LAST) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            step  <= step + 1'b1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end

endmodule
