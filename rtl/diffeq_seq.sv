// diffeq_seq -- differential-equation solver loop as control part plus
// operative part, four clocks per iteration.
//
// Same algorithm as diffeq_comb (while x < a: x += dx; u -= 3*x*u*dx +
// 3*y*dx; y += u*dx; return y), but the operative part has only two
// multipliers, one adder, one subtractor and one comparator, shared over
// four states by operand multiplexers, plus temporaries m1, m2, m3, s1, s2.
// The operators are spread over the states as late as possible:
//   E1  m1 <= 3*x            m2 <= u*dx                      (2 multipliers)
//   E2  m1 <= m1*m2 (3x u dx) m3 <= 3*y                      (2 multipliers)
//   E3  m3 <= m3*dx (3y dx)  s1 <= u - m1   s2 <= y + m2     (mult, sub, add)
//   E4  test x < a; if true commit u <= s1 - m3, x <= x + dx, y <= s2 and
//       go to E1; if false commit nothing and go to FIN     (sub, add, cmp)
// Registers are written at the end of a state.  Because nothing of the loop
// state changes before E4, the body is computed speculatively and the test
// of the while loop only decides whether it is kept.  The critical path is
// one multiplier plus its operand mux.
// Interface: start is taken in IDLE or FIN and loads x, y, u, dx, a.  A run
// of k iterations takes 4k + 5 clocks from the start clock to done (k kept
// passes, one discarded pass, the start clock); done stays high (FIN) with
// y_out = y until the next start.  iters counts completed iterations.
// The operator budget, the per-state operator allocation, the four clocks
// per iteration and the temporaries m1, m2, s1, s2 come from the source
// material; the assignment of each operation to a state within that
// allocation, the extra temporary m3, W (32, as a C int), wrap-around
// arithmetic and the handshake are this design's choices.
// Reset is asynchronous, active high.
module diffeq_seq #(
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
  typedef enum logic [2:0] {IDLE, E1, E2, E3, E4, FIN} state_t;
  state_t state;

  logic signed [W-1:0] x, y, u, dx, a, m1, m2, m3, s1, s2;
  // shared operators and their operands
  logic signed [W-1:0] p0a, p0b, p0, p1a, p1b, p1, ada, adb, add, sba, sbb, sub;
  logic                lt;

  always_comb begin
    // operand multiplexers, selected by state (E1 values by default)
    p0a = W'(3); p0b = x;  p1a = u;  p1b = dx;
    ada = y;     adb = m2; sba = u;  sbb = m1;
    unique case (state)
      E2: begin p0a = m1; p0b = m2; p1a = W'(3); p1b = y; end
      E3: begin p0a = m3; p0b = dx; end
      E4: begin ada = x; adb = dx; sba = s1; sbb = m3; end
      default: ;
    endcase
    p0  = p0a * p0b;
    p1  = p1a * p1b;
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
            state <= E1;
          end
        E1: begin m1 <= p0; m2 <= p1; state <= E2; end
        E2: begin m1 <= p0; m3 <= p1; state <= E3; end
        E3: begin m3 <= p0; s1 <= sub; s2 <= add; state <= E4; end
        E4:
          if (lt) begin
            u <= sub; x <= add; y <= s2;
            iters <= iters + 16'd1;
            state <= E1;
          end else begin
            state <= FIN;
          end
        default: state <= IDLE;
      endcase
    end

  assign done  = (state == FIN);
  assign y_out = y;
endmodule
