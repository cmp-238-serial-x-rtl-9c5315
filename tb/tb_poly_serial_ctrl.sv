// tb_poly_serial_ctrl -- checks the control FSM of the serial polynomial
// unit: idle waits for start, then six clocks S0..S5 with the output table
// (lx, ls, m1, m2, h, p) expected per state, then idle again.
module tb_poly_serial_ctrl;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic lx, ls, m2, h, p;
  logic [1:0] m1;
  int checks = 0, failures = 0;

  poly_serial_ctrl dut (.clk, .rst, .start, .lx, .ls, .m1, .m2, .h, .p);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {lx, ls, m1, m2, h, p} for S0..S5; don't-care selects are 0
  localparam logic [6:0] EXP [6] = '{
    7'b1_0_00_0_0_0,   // S0 load X
    7'b0_1_01_0_1_0,   // S1 A*X
    7'b0_1_10_1_0_0,   // S2 B+S
    7'b0_1_00_1_1_0,   // S3 X*S
    7'b0_1_11_1_0_0,   // S4 C+S
    7'b0_0_00_0_0_1    // S5 done
  };

  task automatic chk(input logic [6:0] exp, input string what);
    checks++;
    if ({lx, ls, m1, m2, h, p} !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, {lx, ls, m1, m2, h, p}, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 20; run++) begin
      // idle for a few clocks: everything low
      repeat (run % 4 + 1) begin
        @(negedge clk);
        chk(7'b0, "idle");
      end
      start = 1'b1;
      @(negedge clk);
      start = (run % 2 == 1);   // sometimes hold start high: must not matter
      for (int s = 0; s < 6; s++) begin
        chk(EXP[s], $sformatf("run %0d state S%0d", run, s));
        @(negedge clk);
      end
      start = 1'b0;
      chk(7'b0, "back in idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
