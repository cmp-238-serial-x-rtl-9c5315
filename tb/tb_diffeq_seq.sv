// tb_diffeq_seq -- runs the four-state diffeq unit on random start values and checks y, the iteration count and the run time of four clocks per iteration plus one discarded four-clock pass against the algorithm computed here.
module tb_diffeq_seq;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic signed [31:0] x_in = 0, y_in = 0, u_in = 0, dx_in = 0, a_in = 0, y_out;
  logic done;
  logic [15:0] iters;
  int checks = 0, failures = 0;

  diffeq_seq dut (.clk, .rst, .start, .x_in, .y_in, .u_in, .dx_in, .a_in, .y_out, .done, .iters);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: forward-Euler steps on 32-bit wrapping ints
  task automatic model(input int x, y, u, dx, a, output int yr, output int k);
    int udx, nu;
    for (k = 0; x < a; k++) begin
      udx = u * dx;
      nu  = u - 3 * x * udx - 3 * dx * y;
      y  += udx;
      x  += dx;
      u   = nu;
    end
    yr = y;
  endtask

  initial begin
    int n, ey, ek;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 200; run++) begin
      x_in  = 32'($urandom % 41) - 20;
      a_in  = 32'($urandom % 41) - 10;
      dx_in = 32'($urandom % 5) + 1;
      u_in  = 32'($urandom % 2001) - 1000;
      y_in  = 32'($urandom % 2001) - 1000;
      if (run % 10 == 3) begin x_in = 5; a_in = 5; end        // no iteration at all
      if (run % 10 == 4) begin u_in = 32'h7fff_0000; dx_in = 3; end  // wraps
      model(x_in, y_in, u_in, dx_in, a_in, ey, ek);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      x_in = 0; y_in = 0; u_in = 0; dx_in = 0; a_in = 0;
      n = 0;
      while (!done && n < 5000) begin @(negedge clk); n++; end
      checks++;
      if (y_out !== ey) begin failures++; $display("FAIL run %0d: y=%0d expected %0d", run, y_out, ey); end
      checks++;
      if (iters !== 16'(ek)) begin failures++; $display("FAIL run %0d: %0d iterations, expected %0d", run, iters, ek); end
      checks++;
      if (n != 4 * ek + 4) begin failures++; $display("FAIL run %0d: done after %0d clocks, expected %0d", run, n, 4 * ek + 4); end
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
