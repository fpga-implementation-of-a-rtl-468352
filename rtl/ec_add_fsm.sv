// ec_add_fsm: addition of two distinct points, x1 != x2, on the binary curve
// y^2 + xy = x^3 + ax^2 + b in affine coordinates, by sequencing the combined
// GF(2^m) operator.
//
//   lambda = (y1 + y2)/(x1 + x2),  x3 = lambda^2 + lambda + x1 + x2 + a,
//   y3 = lambda*(x1 + x3) + x3 + y1
// The twelve field operations, one at a time (issue, then wait for done):
//   s=x1+x2  t1=1/s  t2=y1+y2  L=t2*t1  t1=L^2  t1=t1+L  t1=t1+s
//   x3=t1+a  t1=x1+x3  t1=L*t1  t1=t1+x3  y3=t1+y1
// The caller handles the cases x1 = x2 and the point at infinity, and keeps
// the inputs steady while busy. About 1 inversion + 3 multiplications of m
// clocks, plus one issue clock per operation.
// Interface: start/busy/done with x3, y3 valid while done is high (and held
// until the next start); alu_* is the request/response port to gf2m_alu.
//
// A separate addition sequencer follows the original hierarchy; affine
// coordinates and the operation order are this implementation's choices.
module ec_add_fsm
  import gf2m_pkg::*;
#(
  parameter int unsigned M = GF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] x1,
  input  logic [M-1:0] y1,
  input  logic [M-1:0] x2,
  input  logic [M-1:0] y2,
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

  localparam logic [3:0] LAST = 4'd11;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;

  state_t       state;
  logic [3:0]   step;
  logic [M-1:0] s, t1, t2, lam;

  assign busy      = (state != S_IDLE);
  assign alu_start = (state == S_ISSUE);

  always_comb begin
    alu_op = GF_ADD;
    alu_a  = '0;
    alu_b  = '0;
    case (step)
      4'd0:  begin alu_op = GF_ADD; alu_a = x1;  alu_b = x2;     end
      4'd1:  begin alu_op = GF_INV; alu_a = s;   end
      4'd2:  begin alu_op = GF_ADD; alu_a = y1;  alu_b = y2;     end
      4'd3:  begin alu_op = GF_MUL; alu_a = t2;  alu_b = t1;     end
      4'd4:  begin alu_op = GF_SQR; alu_a = lam; end
      4'd5:  begin alu_op = GF_ADD; alu_a = t1;  alu_b = lam;    end
      4'd6:  begin alu_op = GF_ADD; alu_a = t1;  alu_b = s;      end
      4'd7:  begin alu_op = GF_ADD; alu_a = t1;  alu_b = a_coef; end
      4'd8:  begin alu_op = GF_ADD; alu_a = x1;  alu_b = x3;     end
      4'd9:  begin alu_op = GF_MUL; alu_a = lam; alu_b = t1;     end
      4'd10: begin alu_op = GF_ADD; alu_a = t1;  alu_b = x3;     end
      default: begin alu_op = GF_ADD; alu_a = t1; alu_b = y1;    end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      done  <= 1'b0;
      s     <= '0;
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
            4'd0:  s   <= alu_res;
            4'd2:  t2  <= alu_res;
            4'd3:  lam <= alu_res;
            4'd7:  x3  <= alu_res;
            4'd11: y3  <= alu_res;
            default: t1 <= alu_res;
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
