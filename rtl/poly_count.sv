// poly_count -- evaluator of S = X*(A*X + B) + C sequenced by a 2-bit counter.
//
// While start is high, X is loaded from `dado` and the counter is cleared.
// Once start falls the counter runs freely and each count value selects
// the operation written into S:
//   cont 01: S <= A * X    cont 10: S <= S + B
//   cont 11: S <= S * X    cont 00: S <= S + C
// The first clock after start (cont 00) adds C to a stale S and is ignored;
// the four following clocks form one pass, so S holds the result after the
// fifth clock.  The count keeps cycling and recomputes the same S every four
// clocks.  Although processing is serial, every step has its own operator,
// so synthesis allocates two multipliers and two adders.
// The counter scheme and step order follow the source material.  Choices of
// this design: start clears the counter synchronously (the original clears
// it asynchronously), and the `done` output, high for the one clock in
// which S holds a complete result.  Reset is asynchronous, active high.
module poly_count #(
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
  output logic [OUT_W-1:0] s,
  output logic             done
);
  logic [OUT_W-1:0] regx, regs;
  logic [1:0]       cont;
  logic             pass;   // steps 01..11 of a pass have been written

  always_ff @(posedge clk or posedge rst)
    if (rst)        regx <= '0;
    else if (start) regx <= OUT_W'(dado);

  always_ff @(posedge clk or posedge rst)
    if (rst)        cont <= '0;
    else if (start) cont <= '0;
    else            cont <= cont + 2'd1;

  always_ff @(posedge clk or posedge rst)
    if (rst) regs <= '0;
    else if (!start)
      unique case (cont)
        2'b01:   regs <= OUT_W'(a) * regx;
        2'b10:   regs <= regs + OUT_W'(b);
        2'b11:   regs <= regs * regx;
        default: regs <= regs + OUT_W'(c);
      endcase

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      pass <= 1'b0;
      done <= 1'b0;
    end else if (start) begin
      pass <= 1'b0;
      done <= 1'b0;
    end else begin
      if (cont == 2'b11)      pass <= 1'b1;
      else if (cont == 2'b00) pass <= 1'b0;
      done <= (cont == 2'b00) && pass;
    end

  assign s = regs;
endmodule
