// f2_parallel -- maximum-performance evaluator of F(x) = (A*x^2 + B)/4 + C.
//
// x is loaded from `dado` while start is high.  On every clock with start
// low the result register takes the whole expression, computed by one
// combinational path (two multipliers, two adders and a 2-bit right shift
// standing for the division by 4).  `done` rises one clock after start
// falls (never before a first start) and stays high until the next start.
// The formula and the aim (speed at the cost of area) come from the source
// material; the structure mirrors its combinational version of the first
// example.  Own choices: 8-bit inputs and a 16-bit result as in that
// example, unsigned arithmetic wrapping modulo 2^OUT_W before the shift,
// truncating division.  Reset is asynchronous, active high.
module f2_parallel #(
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
  output logic [OUT_W-1:0] f,
  output logic             done
);
  logic [OUT_W-1:0] regx, regf, t;
  logic             loaded;  // an x has been loaded since reset

  always_comb t = ((OUT_W'(a) * regx * regx + OUT_W'(b)) >> 2) + OUT_W'(c);

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      regx   <= '0;
      loaded <= 1'b0;
    end else if (start) begin
      regx   <= OUT_W'(dado);
      loaded <= 1'b1;
    end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      regf <= '0;
      done <= 1'b0;
    end else begin
      done <= loaded && !start;
      if (!start) regf <= t;
    end

  assign f = regf;
endmodule
