// pipe_adder32 -- 32-bit ripple-carry adder with one pipeline stage in the
// middle of its carry chain.
//
// The adder is made of four 8-bit ripple slices (adder8).  Unpipelined, the
// longest path runs from byte 0 to byte 3.  Here a register bank is placed
// between byte 1 and byte 2, cutting that path in two equal halves:
//   stage 1: A, B input registers -> low half (bytes 0,1) adds;
//            low sum, its carry out and the high operand halves are registered
//   stage 2: high half (bytes 2,3) adds with the registered carry;
//            high sum and the (delayed) low sum go into the output register
// A new operand pair is accepted every clock; `sum` shows A+B three clocks
// after the operands are presented (input, middle and output registers).
// The carry out of the top bit is dropped.  The register placement and the
// slice and half widths follow the source material; reset (asynchronous,
// active high, clearing all registers) is this design's choice.
module pipe_adder32 #(
  parameter int W     = 32,
  parameter int SLICE = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  localparam int H  = W / 2;        // bits per pipeline half
  localparam int NS = H / SLICE;    // slices per half

  // stage 0: input registers
  logic [W-1:0] ra, rb;
  // stage 1: low result, carry, high operands
  logic [H-1:0] lo_q, ahi_q, bhi_q;
  logic         c_q;
  // output register
  logic [W-1:0] sum_q;

  logic [H-1:0] lo_s, hi_s;
  logic [NS:0]  c_lo, c_hi;

  assign c_lo[0] = 1'b0;
  assign c_hi[0] = c_q;

  for (genvar i = 0; i < NS; i++) begin : g_slice
    adder8 #(.W(SLICE)) u_lo (
      .a(ra[i*SLICE +: SLICE]), .b(rb[i*SLICE +: SLICE]), .ci(c_lo[i]),
      .s(lo_s[i*SLICE +: SLICE]), .co(c_lo[i+1])
    );
    adder8 #(.W(SLICE)) u_hi (
      .a(ahi_q[i*SLICE +: SLICE]), .b(bhi_q[i*SLICE +: SLICE]), .ci(c_hi[i]),
      .s(hi_s[i*SLICE +: SLICE]), .co(c_hi[i+1])
    );
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      ra <= '0; rb <= '0;
      lo_q <= '0; ahi_q <= '0; bhi_q <= '0; c_q <= 1'b0;
      sum_q <= '0;
    end else begin
      ra    <= a;
      rb    <= b;
      lo_q  <= lo_s;
      c_q   <= c_lo[NS];
      ahi_q <= ra[W-1:H];
      bhi_q <= rb[W-1:H];
      sum_q <= {hi_s, lo_q};
    end

  assign sum = sum_q;

  // The carry out of the top slice is not part of the W-bit sum.
  logic unused_co;
  assign unused_co = c_hi[NS];
endmodule
