// poly_comb -- fully parallel evaluator of S = X*(A*X + B) + C.
//
// The whole expression is one combinational path (two multipliers, two
// adders) between two registers: X is loaded from `dado` while start is
// high, and S is loaded with ((A*X)+B)*X + C on every clock while start is
// low.  The result is therefore ready one clock after start falls, at the
// cost of a long critical path (two multiplies and two adds).  This follows
// the source material's purely combinational version; zero extension of
// the 8-bit inputs to 16 bits and wrap-around arithmetic as there.
// Reset is asynchronous and active high.
module poly_comb #(
  parameter int IN_W  = 8,
  parameter int OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [IN_W-1:0]  dado,
  input  logic [IN_W-1:0]  a,
  input  logic [IN_W-1:0]  b,
  input  logic [IN_W-1:0]  c,
  output logic [OUT_W-1:0] s
);
  logic [OUT_W-1:0] regx, regs, t1, t2;

  always_comb begin
    t1 = OUT_W'(a) * regx + OUT_W'(b);
    t2 = t1 * regx + OUT_W'(c);
  end

  always_ff @(posedge clk or posedge rst)
    if (rst)        regx <= '0;
    else if (start) regx <= OUT_W'(dado);

  always_ff @(posedge clk or posedge rst)
    if (rst)         regs <= '0;
    else if (!start) regs <= t2;

  assign s = regs;
endmodule
