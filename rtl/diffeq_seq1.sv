// diffeq_seq1 -- differential-equation solver loop with one multiplier,
// one adder, one subtractor and one comparator (resource-limited version).
//
// Same algorithm as diffeq_comb (while x < a: x += dx; u -= 3*x*u*dx +
// 3*y*dx; y += u*dx; return y).  The five products of the loop body
// (3x, u dx, 3x*u dx, 3y, 3y*dx) must pass one by one through the single
// multiplier, so an iteration takes six states:
//   T1  m1 <= 3*x
//   T2  m2 <= u*dx
//   T3  m1 <= m1*m2 (3x u dx)      s2 <= y + m2 (y1)
//   T4  m3 <= 3*y                  s1 <= u - m1
//   T5  m3 <= m3*dx (3y dx)
//   T6  test x < a; if true commit u <= s1 - m3, x <= x + dx, y <= s2 and go
//       to T1; if false commit nothing and go to FIN
// Every state has at most one multiplier on its path, so the clock period is
// that of diffeq_seq; the price is six clocks per iteration instead of four.
// As in diffeq_seq the body is computed speculatively and only the last
// state's test decides whether it is kept.
// Interface: identical to diffeq_seq.  A run of k iterations takes 6k + 7
// clocks from the start clock to done (k kept passes, one discarded pass,
// the start clock).
// The operator budget (1 multiplier, 1 adder, 1 subtractor, 1 comparator)
// and the one-multiplier critical path come from the source material, which
// leaves the cycle count open; the schedule, the six states, W (32, as a C
// int) and the handshake are this design's choices.
// Reset is asynchronous, active high.
module diffeq_seq1 #(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [W-1:0] u_in,
  input  logic signed [W-1:0] dx_in,
  input  logic signed [W-1:0] a_in,
  output logic signed [W-1:0] y_out,
  output logic                done,
  output logic [15:0]         iters
);
  typedef enum logic [2:0] {IDLE, T1, T2, T3, T4, T5, T6, FIN} state_t;
  state_t state;

  logic signed [W-1:0] x, y, u, dx, a, m1, m2, m3, s1, s2;
  // shared operators and their operands
  logic signed [W-1:0] pa, pb, p, ada, adb, add, sba, sbb, sub;
  logic                lt;

  always_comb begin
    // operand multiplexers, selected by state (T1 values by default)
    pa  = W'(3); pb = x;
    ada = y;     adb = m2;
    sba = u;     sbb = m1;
    unique case (state)
      T2: begin pa = u;  pb = dx; end
      T3: begin pa = m1; pb = m2; end
      T4: begin pa = W'(3); pb = y; end
      T5: begin pa = m3; pb = dx; end
      T6: begin ada = x; adb = dx; sba = s1; sbb = m3; end
      default: ;
    endcase
    p   = pa * pb;
    add = ada + adb;
    sub = sba - sbb;
    lt  = x < a;
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      state <= IDLE;
      x <= '0; y <= '0; u <= '0; dx <= '0; a <= '0;
      m1 <= '0; m2 <= '0; m3 <= '0; s1 <= '0; s2 <= '0; iters <= '0;
    end else begin
      unique case (state)
        IDLE, FIN:
          if (start) begin
            x <= x_in; y <= y_in; u <= u_in; dx <= dx_in; a <= a_in;
            iters <= '0;
            state <= T1;
          end
        T1: begin m1 <= p; state <= T2; end
        T2: begin m2 <= p; state <= T3; end
        T3: begin m1 <= p; s2 <= add; state <= T4; end
        T4: begin m3 <= p; s1 <= sub; state <= T5; end
        T5: begin m3 <= p; state <= T6; end
        T6:
          if (lt) begin
            u <= sub; x <= add; y <= s2;
            iters <= iters + 16'd1;
            state <= T1;
          end else begin
            state <= FIN;
          end
        default: state <= IDLE;
      endcase
    end

  assign done  = (state == FIN);
  assign y_out = y;
endmodule
