// tb_poly_serial -- runs the serial polynomial unit end to end: random X,
// A, B, C; start; waits for done and checks S = A*X^2 + B*X + C (mod 2^16)
// and that done comes exactly 6 clocks after the start clock.
module tb_poly_serial;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [7:0] dado = 0, a = 0, b = 0, c = 0;
  logic [15:0] s;
  logic done;
  int checks = 0, failures = 0;

  poly_serial dut (.clk, .rst, .start, .dado, .a, .b, .c, .s, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [15:0] exp;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 300; run++) begin
      dado = 8'($urandom); a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      if (run == 0) begin dado = 8'd255; a = 8'd255; b = 8'd255; c = 8'd255; end
      exp = 16'(32'(a) * dado * dado + 32'(b) * dado + c);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n = 1;
      while (!done && n < 50) begin @(negedge clk); n++; end
      checks++;
      if (n != 6) begin failures++; $display("FAIL run %0d: done after %0d clocks, expected 6", run, n); end
      checks++;
      if (s !== exp) begin failures++; $display("FAIL run %0d: S=%0d expected %0d", run, s, exp); end
      @(negedge clk);
      checks++;
      if (done || s !== exp) begin failures++; $display("FAIL run %0d: done not a pulse or S lost", run); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
