// gf2m_alu: combined GF(2^m) operator (adder, multiplier, squarer, inverter)
// in polynomial (standard) basis.
//
// One set of registers serves all four operations, which keeps the circuit
// small: Z holds the multiplicand, B the multiplier and D the product, and
// the same B, together with F, G and C, carries the state of the inverter.
//   GF_ADD  D = Z xor B                                   1 iteration
//   GF_MUL  D = Z * B mod f, bit-serial, most significant
//           multiplier bit first: D = D*x mod f + b_i*Z    m iterations
//   GF_SQR  as GF_MUL with B = Z                          m iterations
//   GF_INV  Almost Inverse Algorithm: B*a = x^k (mod f) is kept invariant
//           while F, G run from (a, f) down to F = 1; each iteration either
//           divides F by x (C*x, k+1) or adds G to F (B+C), swapping F/G and
//           B/C first when deg F < deg G. The result B*x^-k is then found
//           with k halvings mod f. Inverting 0 returns 0.
// Interface: start (accepted only while busy is low) with op, opa, opb; done
// pulses for one clock with the result on result, which holds until the next
// operation. Timing: result is valid in the clock after start plus the
// iteration count (1 for add, m for multiply and square, data dependent for
// inversion: up to about 3m for the Almost Inverse loop plus up to 2m
// halvings; about 740 to 850 clocks, mean 800, in GF(2^193)).
// Parameters: M is the field degree; POLY the reduction polynomial with
// bit M set. The polynomial is a parameter here rather than a register.
//
// Sharing one register set among adder, multiplier, squarer and an
// Almost-Inverse-Algorithm inverter, and the roles of Z, B and D, follow the
// original design; the exact multiplexer network of the original is not
// reproduced, and the bit-serial multiplier is this implementation's choice.
module gf2m_alu
  import gf2m_pkg::*;
#(
  parameter int unsigned    M    = GF_M,
  parameter logic [M:0]     POLY = (M+1)'(GF_POLY)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  gf_op_t       op,
  input  logic [M-1:0] opa,
  input  logic [M-1:0] opb,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] result
);

  localparam int unsigned KW = $clog2(4 * M + 2);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_AIA, S_FIX} state_t;

  state_t        state;
  logic [M-1:0]  z_q;
  logic [M:0]    b_q, c_q, f_q, g_q;
  logic [M-1:0]  d_q;
  logic [KW-1:0] k_q;
  logic [$clog2(M+1)-1:0] cnt_q;

  logic [M:0]    d_shift;
  logic [M:0]    fg_sum;
  logic          f_lower;     // deg F < deg G
  logic [M:0]    b_half;

  assign busy   = (state != S_IDLE);
  assign result = d_q;

  always_comb begin
    d_shift = {d_q, 1'b0};
    if (d_shift[M]) d_shift = d_shift ^ POLY;
    fg_sum  = f_q ^ g_q;
    f_lower = (f_q < g_q) && (f_q < fg_sum);
    b_half  = (b_q[0] ? (b_q ^ POLY) : b_q) >> 1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      z_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      f_q   <= '0;
      g_q   <= '0;
      d_q   <= '0;
      k_q   <= '0;
      cnt_q <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          z_q <= opa;
          case (op)
            GF_ADD: begin
              d_q  <= opa ^ opb;
              done <= 1'b1;
            end
            GF_MUL, GF_SQR: begin
              b_q   <= {1'b0, (op == GF_SQR) ? opa : opb};
              d_q   <= '0;
              cnt_q <= ($clog2(M+1))'(M);
              state <= S_MUL;
            end
            default: begin   // GF_INV
              f_q <= {1'b0, opa};
              g_q <= POLY;
              b_q <= (M+1)'(1);
              c_q <= '0;
              k_q <= '0;
              if (opa == '0) begin
                d_q  <= '0;
                done <= 1'b1;
              end else begin
                state <= S_AIA;
              end
            end
          endcase
        end
        S_MUL: begin
          d_q   <= d_shift[M-1:0] ^ (b_q[M-1] ? z_q : '0);
          b_q   <= b_q << 1;
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        S_AIA: begin
          if (!f_q[0]) begin
            f_q <= f_q >> 1;
            c_q <= c_q << 1;
            k_q <= k_q + 1'b1;
          end else if (f_q == (M+1)'(1)) begin
            state <= S_FIX;
          end else if (f_lower) begin
            f_q <= fg_sum;
            g_q <= f_q;
            b_q <= b_q ^ c_q;
            c_q <= b_q;
          end else begin
            f_q <= fg_sum;
            b_q <= b_q ^ c_q;
          end
        end
        S_FIX: begin
          if (k_q == '0) begin
            d_q   <= b_q[M-1:0];
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            b_q <= b_half;
            k_q <= k_q - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
