// tb_pipe_adder32 -- streams a new operand pair into the pipelined 32-bit
// adder every clock and checks that each sum appears exactly 3 clocks
// later; corner cases make the carry n_cross the pipeline cut (bit 15 -> 16).
module tb_pipe_adder32;
  localparam int LAT = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] a = 0, b = 0, sum;
  logic [31:0] exp_q [$];
  int checks = 0, failures = 0, n_cross = 0;

  pipe_adder32 dut (.clk, .rst, .a, .b, .sum);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 5000 + LAT; i++) begin
      if (i < 5000) begin
        unique case (i % 5)
          0: begin a = 32'h0000_FFFF; b = 32'($urandom % 4) + 1; end
          1: begin a = 32'hFFFF_FFFF; b = 32'd1; end
          default: begin a = $urandom; b = $urandom; end
        endcase
        exp_q.push_back(a + b);
        if (33'(a[15:0]) + b[15:0] > 33'hFFFF) n_cross++;
      end
      @(posedge clk); #1;
      if (i >= LAT - 1 && exp_q.size() > 0 && i - (LAT - 1) < 5000) begin
        logic [31:0] e;
        e = exp_q.pop_front();
        checks++;
        if (sum !== e) begin
          failures++;
          if (failures < 10) $display("FAIL item %0d: sum %h expected %h", i - LAT + 1, sum, e);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_cross == 0) begin failures++; $display("FAIL no carry across the cut"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
