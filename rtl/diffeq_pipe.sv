// diffeq_pipe -- the loop body of the differential-equation solver as a
// four-stage pipeline.
//
// Computes, for one set (x, y, u, dx, a) per clock,
//   x1 = x + dx,  y1 = y + u*dx,  u1 = u - 3*x*u*dx - 3*y*dx,  teste = x < a
// and delivers it four clocks later with out_valid.  Stages follow the
// levels of the operator graph, so the longest path is one multiplier:
//   stage 1  3*x, u*dx, 3*y, x + dx, x < a      (3 multipliers)
//   stage 2  (3x)*(u dx), (3y)*dx, y + u dx      (2 multipliers)
//   stage 3  u - 3x u dx
//   stage 4  u1 = (u - 3x u dx) - 3y dx
// Operands needed later (y, u, dx, a and finished results) travel with the
// data.  Because each iteration needs the previous one's x, y, u, a single
// loop can issue only every fourth clock; a full pipeline serves four
// independent loops interleaved (the caller feeds x1, y1, u1 back in while
// teste is true).  dx and a come out again for that purpose.
// Operator count, depth 4 and one-multiplier stages follow the source
// material; the exact stage split, the valid bits and the pass-through of
// dx and a are this design's choices.  W = 32 as a C int, two's-complement
// wrap-around.  Reset is asynchronous, active high.
module diffeq_pipe #(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  input  logic signed [W-1:0] u,
  input  logic signed [W-1:0] dx,
  input  logic signed [W-1:0] a,
  output logic                out_valid,
  output logic signed [W-1:0] x1,
  output logic signed [W-1:0] y1,
  output logic signed [W-1:0] u1,
  output logic                teste,
  output logic signed [W-1:0] dx_o,
  output logic signed [W-1:0] a_o
);
  typedef struct packed {
    logic                v;
    logic                t;     // x < a
    logic signed [W-1:0] x1;
    logic signed [W-1:0] y;     // y, later y1
    logic signed [W-1:0] u;     // u, later u - 3x u dx, later u1
    logic signed [W-1:0] dx;
    logic signed [W-1:0] a;
    logic signed [W-1:0] p;     // 3x, later 3x u dx
    logic signed [W-1:0] q;     // u dx
    logic signed [W-1:0] r;     // 3y, later 3y dx
  } stage_t;

  stage_t s1, s2, s3, s4, n1, n2, n3, n4;

  always_comb begin
    // stage 1
    n1    = '0;
    n1.v  = in_valid;
    n1.t  = x < a;
    n1.x1 = x + dx;
    n1.y  = y;
    n1.u  = u;
    n1.dx = dx;
    n1.a  = a;
    n1.p  = W'(3) * x;
    n1.q  = u * dx;
    n1.r  = W'(3) * y;
    // stage 2
    n2   = s1;
    n2.p = s1.p * s1.q;
    n2.r = s1.r * s1.dx;
    n2.y = s1.y + s1.q;
    // stage 3
    n3   = s2;
    n3.u = s2.u - s2.p;
    // stage 4
    n4   = s3;
    n4.u = s3.u - s3.r;
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0;
    end else begin
      s1 <= n1; s2 <= n2; s3 <= n3; s4 <= n4;
    end

  assign out_valid = s4.v;
  assign teste     = s4.t;
  assign x1        = s4.x1;
  assign y1        = s4.y;
  assign u1        = s4.u;
  assign dx_o      = s4.dx;
  assign a_o       = s4.a;

  // Fields no longer needed after the last stage.
  logic unused;
  assign unused = ^{s4.p, s4.q, s4.r};
endmodule
