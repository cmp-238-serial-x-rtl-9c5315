// tb_f2_serial -- checks the minimum-area F(x) = (A*x^2+B)/4+C unit: result when done rises, six clocks after start falls when start is held one clock.
module tb_f2_serial;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [7:0] dado = 0, a = 0, b = 0, c = 0;
  logic [15:0] res;
  logic done;
  int checks = 0, failures = 0;

  f2_serial dut (.clk, .rst, .start, .dado, .a, .b, .c, .f(res), .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(input logic [7:0] x, a, b, c);
    logic [15:0] t; t = 16'(32'(a) * x * x) + b; return (t >> 2) + c;
  endfunction

  initial begin
    int n;
    logic [15:0] exp;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 300; run++) begin
      dado = 8'($urandom); a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      if (run == 0) begin dado = 8'd255; a = 8'd255; b = 8'd255; c = 8'd255; end
      if (run == 1) begin dado = 8'd0; end
      exp = model(dado, a, b, c);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n = 0;
      while (!done && n < 50) begin @(negedge clk); n++; end
      checks++;
      if (n != 6) begin failures++; $display("FAIL run %0d: result after %0d clocks, expected 6", run, n); end
      checks++;
      if (res !== exp) begin failures++; $display("FAIL run %0d: got %0d expected %0d", run, res, exp); end
      repeat ($urandom % 6) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
