// poly_serial -- serial evaluator of S = A*X^2 + B*X + C, computed as
// S = X*(A*X + B) + C with one shared add/multiply operator.
//
// poly_serial_ctrl (a 7-state one-hot FSM) drives the mux selects, operator
// choice and register loads of poly_serial_dp.  Usage: put the new X on
// `dado`, pulse start, wait for done.  done is high for one clock, six
// clocks after start is seen in idle (S0 load, four operations, S5), and s
// then holds the result until the next run finishes its first operation.
// The split into control and operative parts follows the source material.
module poly_serial #(
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
  logic       lx, ls, m2, h;
  logic [1:0] m1;

  poly_serial_ctrl u_pc (
    .clk, .rst, .start, .lx, .ls, .m1, .m2, .h, .p(done)
  );

  poly_serial_dp #(.IN_W(IN_W), .OUT_W(OUT_W)) u_po (
    .clk, .rst, .lx, .m1, .m2, .ls, .h, .dado, .a, .b, .c, .s
  );
endmodule
