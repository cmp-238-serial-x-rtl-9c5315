// poly_serial_dp -- operative part (PO) of the serial evaluator of
// S = X*(A*X + B) + C.
//
// Register X is loaded from `dado` when lx is high.  Mux M1 picks one operand
// from X, A, B, C (select 00, 01, 10, 11); mux M2 picks X (0) or the result
// register S (1).  A single operator adds (h = 0) or multiplies (h = 1) the
// two operands, and register S captures the result when ls is high.  S is
// the output and is fed back through M2, so the datapath accumulates.
// Inputs are zero-extended to OUT_W bits and arithmetic wraps modulo 2^OUT_W.
// Structure, mux codes and the 8/16-bit widths follow the source material;
// reset is asynchronous and active high, clearing both registers.
module poly_serial_dp #(
  parameter int IN_W  = 8,
  parameter int OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             lx,
  input  logic [1:0]       m1,
  input  logic             m2,
  input  logic             ls,
  input  logic             h,
  input  logic [IN_W-1:0]  dado,
  input  logic [IN_W-1:0]  a,
  input  logic [IN_W-1:0]  b,
  input  logic [IN_W-1:0]  c,
  output logic [OUT_W-1:0] s
);
  logic [OUT_W-1:0] regx, regs, mux1, mux2, ula;

  always_ff @(posedge clk or posedge rst)
    if (rst)     regx <= '0;
    else if (lx) regx <= OUT_W'(dado);

  always_ff @(posedge clk or posedge rst)
    if (rst)     regs <= '0;
    else if (ls) regs <= ula;

  always_comb begin
    unique case (m1)
      2'b00:   mux1 = regx;
      2'b01:   mux1 = OUT_W'(a);
      2'b10:   mux1 = OUT_W'(b);
      default: mux1 = OUT_W'(c);
    endcase
    mux2 = m2 ? regs : regx;
    ula  = h ? mux1 * mux2 : mux1 + mux2;
  end

  assign s = regs;
endmodule
