// adder8 -- ripple-carry adder slice with carry in and carry out.
//
// The slice of the source material's 32-bit ripple-carry adder example
// (an 8-bit add box with CI and CO).  Written as a chain of full adders so
// the carry really ripples from bit 0 to bit W-1.  Purely combinational.
module adder8 #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign co = c[W];
endmodule
