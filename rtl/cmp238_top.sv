// cmp238_top -- the serial/parallel/pipelined design examples side by side.
//
// The examples are independent circuits that share only clock and reset;
// each brings out its own ports under a prefix:
//   e1s_  S = A*X^2+B*X+C, serial control + operative part (poly_serial)
//   e1c_  the same, fully combinational between two registers (poly_comb)
//   e1v_  the same, sequenced by a 2-bit counter (poly_count)
//   e2p_  F(x) = (A*x^2+B)/4+C, maximum performance (f2_parallel)
//   e2s_  the same, minimum area (f2_serial)
//   add_  32-bit ripple-carry adder with a mid-chain pipeline stage
//   bl_   pipelined blend datapath
//   dc_, ds_, ds1_, dp_  differential-equation loop: combinational body,
//         four-state control/operative, one-multiplier control/operative,
//         four-stage pipeline
//   mu_   4x4 array multiplier with a register after every row
// Every example keeps the default parameters of its own module; see each
// module for its timing.  Reset is asynchronous, active high.
module cmp238_top (
  input  logic        clk,
  input  logic        rst,
  // Example 1, serial
  input  logic        e1s_start,
  input  logic [7:0]  e1s_x, e1s_a, e1s_b, e1s_c,
  output logic [15:0] e1s_s,
  output logic        e1s_done,
  // Example 1, combinational
  input  logic        e1c_start,
  input  logic [7:0]  e1c_x, e1c_a, e1c_b, e1c_c,
  output logic [15:0] e1c_s,
  // Example 1, counter sequenced
  input  logic        e1v_start,
  input  logic [7:0]  e1v_x, e1v_a, e1v_b, e1v_c,
  output logic [15:0] e1v_s,
  output logic        e1v_done,
  // Example 2, parallel
  input  logic        e2p_start,
  input  logic [7:0]  e2p_x, e2p_a, e2p_b, e2p_c,
  output logic [15:0] e2p_f,
  output logic        e2p_done,
  // Example 2, serial
  input  logic        e2s_start,
  input  logic [7:0]  e2s_x, e2s_a, e2s_b, e2s_c,
  output logic [15:0] e2s_f,
  output logic        e2s_done,
  // pipelined adder
  input  logic [31:0] add_a, add_b,
  output logic [31:0] add_sum,
  // blend datapath
  input  logic [7:0]  bl_a, bl_b,
  input  logic [8:0]  bl_f,
  output logic [7:0]  bl_y,
  // diffeq, combinational body
  input  logic        dc_start,
  input  logic signed [31:0] dc_x, dc_y, dc_u, dc_dx, dc_a,
  output logic signed [31:0] dc_yout,
  output logic        dc_done,
  output logic [15:0] dc_iters,
  // diffeq, four states
  input  logic        ds_start,
  input  logic signed [31:0] ds_x, ds_y, ds_u, ds_dx, ds_a,
  output logic signed [31:0] ds_yout,
  output logic        ds_done,
  output logic [15:0] ds_iters,
  // diffeq, one multiplier
  input  logic        ds1_start,
  input  logic signed [31:0] ds1_x, ds1_y, ds1_u, ds1_dx, ds1_a,
  output logic signed [31:0] ds1_yout,
  output logic        ds1_done,
  output logic [15:0] ds1_iters,
  // diffeq, pipeline
  input  logic        dp_in_valid,
  input  logic signed [31:0] dp_x, dp_y, dp_u, dp_dx, dp_a,
  output logic        dp_out_valid,
  output logic signed [31:0] dp_x1, dp_y1, dp_u1, dp_dx_o, dp_a_o,
  output logic        dp_teste,
  // array multiplier
  input  logic [3:0]  mu_a, mu_b,
  output logic [7:0]  mu_p
);
  poly_serial u_e1s (.clk, .rst, .start(e1s_start), .dado(e1s_x), .a(e1s_a), .b(e1s_b),
                     .c(e1s_c), .s(e1s_s), .done(e1s_done));
  poly_comb   u_e1c (.clk, .rst, .start(e1c_start), .dado(e1c_x), .a(e1c_a), .b(e1c_b),
                     .c(e1c_c), .s(e1c_s));
  poly_count  u_e1v (.clk, .rst, .start(e1v_start), .dado(e1v_x), .a(e1v_a), .b(e1v_b),
                     .c(e1v_c), .s(e1v_s), .done(e1v_done));
  f2_parallel u_e2p (.clk, .rst, .start(e2p_start), .dado(e2p_x), .a(e2p_a), .b(e2p_b),
                     .c(e2p_c), .f(e2p_f), .done(e2p_done));
  f2_serial   u_e2s (.clk, .rst, .start(e2s_start), .dado(e2s_x), .a(e2s_a), .b(e2s_b),
                     .c(e2s_c), .f(e2s_f), .done(e2s_done));
  pipe_adder32 u_add (.clk, .rst, .a(add_a), .b(add_b), .sum(add_sum));
  blend_pipe  u_bl  (.clk, .rst, .a(bl_a), .b(bl_b), .f(bl_f), .y(bl_y));
  diffeq_comb u_dc  (.clk, .rst, .start(dc_start), .x_in(dc_x), .y_in(dc_y), .u_in(dc_u),
                     .dx_in(dc_dx), .a_in(dc_a), .y_out(dc_yout), .done(dc_done), .iters(dc_iters));
  diffeq_seq  u_ds  (.clk, .rst, .start(ds_start), .x_in(ds_x), .y_in(ds_y), .u_in(ds_u),
                     .dx_in(ds_dx), .a_in(ds_a), .y_out(ds_yout), .done(ds_done), .iters(ds_iters));
  diffeq_seq1 u_ds1 (.clk, .rst, .start(ds1_start), .x_in(ds1_x), .y_in(ds1_y), .u_in(ds1_u),
                     .dx_in(ds1_dx), .a_in(ds1_a), .y_out(ds1_yout), .done(ds1_done),
                     .iters(ds1_iters));
  diffeq_pipe u_dp  (.clk, .rst, .in_valid(dp_in_valid), .x(dp_x), .y(dp_y), .u(dp_u),
                     .dx(dp_dx), .a(dp_a), .out_valid(dp_out_valid), .x1(dp_x1), .y1(dp_y1),
                     .u1(dp_u1), .teste(dp_teste), .dx_o(dp_dx_o), .a_o(dp_a_o));
  array_mult4 u_mu  (.clk, .rst, .a(mu_a), .b(mu_b), .p(mu_p));
endmodule
