// diffeq_comb -- differential-equation solver loop, whole body in one clock.
//
// While x < a, one forward-Euler step replaces (x, y, u) by
// (x + dx, y + u dx, u - 3 x u dx - 3 y dx), all from the old values;
// the final y is the answer.  The loop body is a single combinational block with five
// multipliers (3*x, u*dx, 3*y, (3x)*(u dx), (3y)*dx), two adders (x+dx,
// y+u*dx), two subtractors and the comparator; the product u*dx is shared
// by the u and y updates.  Each clock tests x < a with the current values
// and, if true, writes x, y, u; the critical path is two multipliers and
// two subtractors.
// Interface: start (in any state) loads x, y, u, dx, a; the loop then runs
// one iteration per clock; when the test fails done goes high and stays high
// with y_out = y until the next start.  iters counts completed iterations.
// A run of k iterations takes k+1 clocks after the start clock.
// The algorithm and operator graph come from the source material; W-bit
// two's-complement wrap-around arithmetic (W = 32, as a C int), the
// handshake and the iteration counter are this design's choices.
// Reset is asynchronous, active high.
module diffeq_comb #(
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
  logic signed [W-1:0] x, y, u, dx, a;
  logic signed [W-1:0] n1, n2, n4, n5, n6, n7, n8, n10, n11;
  logic                n9, running;

  always_comb begin
    n1  = W'(3) * x;       // 3*x
    n2  = u * dx;          // u*dx
    n4  = W'(3) * y;       // 3*y
    n5  = x + dx;          // x1
    n6  = n1 * n2;         // 3*x*u*dx
    n7  = y + n2;          // y1
    n8  = n4 * dx;         // 3*y*dx
    n9  = x < a;           // loop test
    n10 = u - n6;
    n11 = n10 - n8;        // u1
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      x <= '0; y <= '0; u <= '0; dx <= '0; a <= '0;
      running <= 1'b0; done <= 1'b0; iters <= '0;
    end else if (start) begin
      x <= x_in; y <= y_in; u <= u_in; dx <= dx_in; a <= a_in;
      running <= 1'b1; done <= 1'b0; iters <= '0;
    end else if (running) begin
      if (n9) begin
        x <= n5; y <= n7; u <= n11;
        iters <= iters + 16'd1;
      end else begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end

  assign y_out = y;
endmodule
