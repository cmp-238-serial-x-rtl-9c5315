// blend_pipe -- pipelined alpha-blend datapath  Y = sat(A*F + B*(1-F)).
//
// A and B are unsigned pixels of PIX_W bits; F is an unsigned fixed-point
// factor with one integer bit and FRAC_W fraction bits, 0 <= F <= 1.0
// (1.0 = 2**FRAC_W).  The multipliers are only PIX_W x FRAC_W bits wide:
// they take the fraction bits of F and of 1-F, and their outputs are scaled
// back to pixel width by dropping FRAC_W fraction bits.  The one value a
// fraction cannot hold, 1.0, is handled by a 2:1 mux that passes A itself
// when the MSB of F is set (F = 1.0), and B itself when the MSB of 1-F is set
// (F = 0).  A saturating adder then clips the sum to 2**PIX_W - 1.
//
// Pipeline (one value accepted per clock, latency 3 clocks input to y):
//   clk 1  input registers A, B, F; 1-F formed from the registered F
//   clk 2  register inside each multiplier (full product); A, B and both
//          mux controls (MSB of F, MSB of 1-F) are delayed by the same
//          register so data and control stay aligned
//   clk 3  muxes, saturating adder, output register
// The block diagram (input registers, 1-F, two multipliers with a pipeline
// register, MSB-controlled muxes, saturating adder, output register) and the
// rule that the other paths and the mux controls must be delayed alike come
// from the source material.  The number format, the widths and where in the
// multiplier the register sits are this design's choices.
// Reset is asynchronous, active high.
module blend_pipe #(
  parameter int PIX_W  = 8,
  parameter int FRAC_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [PIX_W-1:0]  a,
  input  logic [PIX_W-1:0]  b,
  input  logic [FRAC_W:0]   f,
  output logic [PIX_W-1:0]  y
);
  localparam int FW = FRAC_W + 1;            // width of F and 1-F
  localparam int PW = PIX_W + FRAC_W;        // product width
  localparam logic [FW-1:0] ONE = FW'(1) << FRAC_W;

  // clk 1: input registers
  logic [PIX_W-1:0] ra, rb;
  logic [FW-1:0]    rf, omf;
  // clk 2: multiplier pipeline register and aligned paths
  logic [PW-1:0]    pa_q, pb_q;
  logic [PIX_W-1:0] ra_q, rb_q;
  logic             msb_f_q, msb_omf_q;
  // clk 3
  logic [PIX_W-1:0] ma, mb, y_q;
  logic [PIX_W:0]   sum;

  assign omf = ONE - rf;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      ra <= '0; rb <= '0; rf <= '0;
      pa_q <= '0; pb_q <= '0; ra_q <= '0; rb_q <= '0;
      msb_f_q <= 1'b0; msb_omf_q <= 1'b0;
      y_q <= '0;
    end else begin
      ra <= a;
      rb <= b;
      rf <= f;
      pa_q      <= PW'(ra) * PW'(rf[FRAC_W-1:0]);
      pb_q      <= PW'(rb) * PW'(omf[FRAC_W-1:0]);
      ra_q      <= ra;
      rb_q      <= rb;
      msb_f_q   <= rf[FW-1];
      msb_omf_q <= omf[FW-1];
      y_q <= sum[PIX_W] ? {PIX_W{1'b1}} : sum[PIX_W-1:0];
    end

  always_comb begin
    ma  = msb_f_q   ? ra_q : pa_q[FRAC_W +: PIX_W];
    mb  = msb_omf_q ? rb_q : pb_q[FRAC_W +: PIX_W];
    sum = {1'b0, ma} + {1'b0, mb};
  end

  assign y = y_q;

  // F must lie in [0, 1.0].
  always_comb if (!rst) a_f_range: assert (rf <= ONE);

  // Fraction bits of the products are dropped.
  logic unused_lo;
  assign unused_lo = ^{pa_q[FRAC_W-1:0], pb_q[FRAC_W-1:0]};
endmodule
