// tb_poly_count -- checks the counter-sequenced polynomial unit: S = A*X^2+B*X+C (mod 2^16), done five clocks after start falls, and the same result again every four clocks.
module tb_poly_count;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [7:0] dado = 0, a = 0, b = 0, c = 0;
  logic [15:0] res;
  logic done;
  int checks = 0, failures = 0;

  poly_count dut (.clk, .rst, .start, .dado, .a, .b, .c, .s(res), .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(input logic [7:0] x, a, b, c);
    return 16'(32'(a) * x * x + 32'(b) * x + c);
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
      repeat (run % 3 + 1) @(negedge clk);   // start held 1..3 clocks
      start = 1'b0;
      n = 0;
      while (!done && n < 50) begin @(negedge clk); n++; end
      checks++;
      if (n != 5) begin failures++; $display("FAIL run %0d: result after %0d clocks, expected 5", run, n); end
      checks++;
      if (res !== exp) begin failures++; $display("FAIL run %0d: got %0d expected %0d", run, res, exp); end
      // the count runs on and rebuilds the same result every four clocks
      repeat (4) @(negedge clk);
      checks++;
      if (!done || res !== exp) begin failures++; $display("FAIL run %0d: no repeat of the result", run); end
      repeat ($urandom % 6) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
