// poly_serial_ctrl -- control part (PC) of the serial evaluator of
// S = A*X^2 + B*X + C, rewritten as S = X*(A*X + B) + C.
//
// A seven-state machine (idle, S0..S5) steers a datapath that has one shared
// add/multiply operator and an accumulating result register (poly_serial_dp).
// In idle it waits for start; S0 loads X; S1..S4 run the four operations
// A*X, +B, *X, +C, each writing the result register; S5 raises p (done) for
// one clock and returns to idle.  Per-state outputs:
//
//   state  lx ls m1 m2 h  p    operation
//   S0     1  0  -  -  -  0    X <= new value
//   S1     0  1  01 0  1  0    S <= A * X
//   S2     0  1  10 1  0  0    S <= B + S
//   S3     0  1  00 1  1  0    S <= X * S
//   S4     0  1  11 1  0  0    S <= C + S
//   S5     0  0  -  -  -  1    done
//
// The sequence, the output table and one-hot state coding follow the source
// material.  Don't-care outputs are driven to 0 (ls low in idle and S0 keeps
// the last result visible), a design choice.
// Timing: start is sampled in idle; p is high 6 clocks after leaving idle.
// Reset is asynchronous, active high.
module poly_serial_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic       lx,
  output logic       ls,
  output logic [1:0] m1,
  output logic       m2,
  output logic       h,
  output logic       p
);
  // One-hot state vector: bit i set = state i.
  typedef enum logic [6:0] {
    IDLE = 7'b0000001,
    S0   = 7'b0000010,
    S1   = 7'b0000100,
    S2   = 7'b0001000,
    S3   = 7'b0010000,
    S4   = 7'b0100000,
    S5   = 7'b1000000
  } state_t;

  state_t state, next;

  always_ff @(posedge clk or posedge rst)
    if (rst) state <= IDLE;
    else     state <= next;

  always_comb begin
    next = IDLE;
    lx = 1'b0; ls = 1'b0; m1 = 2'b00; m2 = 1'b0; h = 1'b0; p = 1'b0;
    unique case (state)
      IDLE: next = start ? S0 : IDLE;
      S0: begin next = S1; lx = 1'b1; end
      S1: begin next = S2; ls = 1'b1; m1 = 2'b01; m2 = 1'b0; h = 1'b1; end
      S2: begin next = S3; ls = 1'b1; m1 = 2'b10; m2 = 1'b1; h = 1'b0; end
      S3: begin next = S4; ls = 1'b1; m1 = 2'b00; m2 = 1'b1; h = 1'b1; end
      S4: begin next = S5; ls = 1'b1; m1 = 2'b11; m2 = 1'b1; h = 1'b0; end
      S5: begin next = IDLE; p = 1'b1; end
      default: next = IDLE;
    endcase
  end

  // The state register must always hold exactly one hot bit.
  always_comb if (!rst) a_onehot: assert ($onehot(state));
endmodule
