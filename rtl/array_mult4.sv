// array_mult4 -- N x N unsigned array multiplier (N = 4), optionally
// pipelined after every row.
//
// Row i ANDs multiplier bit a[i] with the whole multiplicand b and adds that
// partial product to the N-bit partial sum coming from the row above (zero
// for row 0) with an N-bit ripple adder (adder8 with W = N).  The lowest bit
// of the row's N+1-bit result is product bit P[i]; the upper N bits go down
// to the next row.  After the last row those N bits are P[2N-1:N].
//
// With PIPELINED = 1 a register bank follows every row, holding the partial
// sum, the product bits finished so far, and the operand bits still needed
// (a and b travel down with their data).  One product is accepted per clock
// and appears N clocks later; the critical path is one row instead of N.
// With PIPELINED = 0 the array is combinational (latency 0), for the
// with/without pipeline comparison.
// The row structure (AND gates feeding an N-bit adder, P0..P3 leaving one
// per row, P4..P7 from the last row) follows the source material; the
// register placement is this design's choice.  Reset is asynchronous,
// active high, clearing the pipeline registers.
module array_mult4 #(
  parameter int N         = 4,
  parameter bit PIPELINED = 1'b1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // Signals entering row i (index N = after the last row).
  logic [N-1:0] ps [N+1];   // partial sum from the row above
  logic [N-1:0] lo [N+1];   // product bits already finished (bit k = P[k])
  logic [N-1:0] ad [N+1];   // multiplier bits travelling with the data
  logic [N-1:0] bd [N+1];   // multiplicand travelling with the data

  assign ps[0] = '0;
  assign lo[0] = '0;
  assign ad[0] = a;
  assign bd[0] = b;

  for (genvar i = 0; i < N; i++) begin : g_row
    logic [N-1:0] pp, s, lo_n;
    logic         co;

    assign pp = bd[i] & {N{ad[i][i]}};

    adder8 #(.W(N)) u_add (.a(ps[i]), .b(pp), .ci(1'b0), .s(s), .co(co));

    always_comb begin
      lo_n    = lo[i];
      lo_n[i] = s[0];
    end

    if (PIPELINED) begin : g_reg
      always_ff @(posedge clk or posedge rst)
        if (rst) begin
          ps[i+1] <= '0; lo[i+1] <= '0; ad[i+1] <= '0; bd[i+1] <= '0;
        end else begin
          ps[i+1] <= {co, s[N-1:1]};
          lo[i+1] <= lo_n;
          ad[i+1] <= ad[i];
          bd[i+1] <= bd[i];
        end
    end else begin : g_comb
      assign ps[i+1] = {co, s[N-1:1]};
      assign lo[i+1] = lo_n;
      assign ad[i+1] = ad[i];
      assign bd[i+1] = bd[i];
    end
  end

  assign p = {ps[N], lo[N]};

  // Without pipeline registers the clock and reset are not used.
  logic unused;
  assign unused = ^{clk, rst, ad[N], bd[N]};
endmodule
