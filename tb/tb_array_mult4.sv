// tb_array_mult4 -- streams all 256 operand pairs through the pipelined
// 4x4 array multiplier (one per clock, product due 4 clocks later) and
// checks the unpipelined build (PIPELINED = 0) combinationally on the same
// pairs.
module tb_array_mult4;
  localparam int LAT = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] a = 0, b = 0;
  logic [7:0] p, pc;
  logic [7:0] exp_q [$];
  int checks = 0, failures = 0;

  array_mult4 dut (.clk, .rst, .a, .b, .p);
  array_mult4 #(.PIPELINED(1'b0)) dut_comb (.clk, .rst, .a, .b, .p(pc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 512 + LAT; i++) begin
      if (i < 512) begin
        a = 4'(i); b = 4'(i >> 4);
        if (i >= 256) begin a = 4'($urandom); b = 4'($urandom); end
        exp_q.push_back(8'(a * b));
        #1;
        checks++;
        if (pc !== 8'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL comb %0d*%0d = %0d", a, b, pc);
        end
      end
      @(posedge clk); #1;
      if (i >= LAT - 1 && i - (LAT - 1) < 512) begin
        logic [7:0] e;
        e = exp_q.pop_front();
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("FAIL pipe item %0d: p=%0d expected %0d", i - LAT + 1, p, e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
