// f2_serial -- minimum-area evaluator of F(x) = (A*x^2 + B)/4 + C.
//
// One shared operator (add, multiply or shift right by two) and one
// accumulating result register S, in the style of the serial datapath of
// the first example: operand 1 comes from a 4:1 mux over X, A, B, C, operand
// 2 from a 2:1 mux over X and S.  A small FSM runs the schedule
//   LOAD  X <= dado
//   MULA  S <= A * X
//   MULX  S <= X * S
//   ADDB  S <= B + S
//   SHR   S <= S >> 2
//   ADDC  S <= C + S
//   FIN   done = 1
// so a result takes 7 clocks after start is seen in idle; done is high for
// one clock in FIN and f then holds the result.  A start seen in FIN begins
// the next run at once.
// The formula and the area goal come from the source material; the
// schedule, the shift as a third operator, the widths (8-bit inputs,
// 16-bit result, wrap-around unsigned arithmetic, truncating division) are
// this design's choices.  Reset is asynchronous, active high.
module f2_serial #(
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
  typedef enum logic [2:0] {IDLE, LOAD, MULA, MULX, ADDB, SHR, ADDC, FIN} state_t;
  typedef enum logic [1:0] {OP_ADD, OP_MUL, OP_SHR} op_t;
  typedef enum logic [1:0] {SEL_X, SEL_A, SEL_B, SEL_C} sel_t;

  state_t state, next;
  op_t    op;
  sel_t   m1;
  logic   m2, lx, ls;
  logic [OUT_W-1:0]   regx, regs, opa, opb, alu;

  // ---- control part ----
  always_ff @(posedge clk or posedge rst)
    if (rst) state <= IDLE;
    else     state <= next;

  always_comb begin
    next = IDLE; op = OP_ADD; m1 = SEL_X; m2 = 1'b1; lx = 1'b0; ls = 1'b0; done = 1'b0;
    unique case (state)
      IDLE: next = start ? LOAD : IDLE;
      LOAD: begin next = MULA; lx = 1'b1; end
      MULA: begin next = MULX; ls = 1'b1; op = OP_MUL; m1 = SEL_A; m2 = 1'b0; end
      MULX: begin next = ADDB; ls = 1'b1; op = OP_MUL; m1 = SEL_X; end
      ADDB: begin next = SHR;  ls = 1'b1; op = OP_ADD; m1 = SEL_B; end
      SHR:  begin next = ADDC; ls = 1'b1; op = OP_SHR; end
      ADDC: begin next = FIN;  ls = 1'b1; op = OP_ADD; m1 = SEL_C; end
      FIN:  begin next = start ? LOAD : IDLE; done = 1'b1; end
      default: next = IDLE;
    endcase
  end

  // ---- operative part ----
  always_comb begin
    unique case (m1)
      SEL_X:   opa = regx;
      SEL_A:   opa = OUT_W'(a);
      SEL_B:   opa = OUT_W'(b);
      default: opa = OUT_W'(c);
    endcase
    opb  = m2 ? regs : regx;
    unique case (op)
      OP_MUL:  alu = opa * opb;
      OP_SHR:  alu = opb >> 2;
      default: alu = opa + opb;
    endcase
  end

  always_ff @(posedge clk or posedge rst)
    if (rst)     regx <= '0;
    else if (lx) regx <= OUT_W'(dado);

  always_ff @(posedge clk or posedge rst)
    if (rst)     regs <= '0;
    else if (ls) regs <= alu;

  assign f = regs;
endmodule
