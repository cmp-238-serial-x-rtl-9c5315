// tb_blend_pipe -- streams pixel pairs and blend factors into the blend
// pipeline, one per clock, and checks each output exactly 3 clocks later
// against  Y = min(255, A*F + B*(1-F))  worked out here, with the products
// truncated to 8 bits and the pass-through of A at F = 1.0 and B at F = 0.
module tb_blend_pipe;
  localparam int LAT = 3, N = 4000;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] a = 0, b = 0, y;
  logic [8:0] f = 0;
  logic [7:0] exp_q [$];
  int checks = 0, failures = 0, n_one = 0, n_zero = 0;

  blend_pipe dut (.clk, .rst, .a, .b, .f, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] model(input int a, b, f);
    int pa, pb, s;
    pa = (f == 256) ? a : (a * f) / 256;
    pb = (f == 0)   ? b : (b * (256 - f)) / 256;
    s  = pa + pb;
    return (s > 255) ? 8'd255 : 8'(s);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        a = 8'($urandom); b = 8'($urandom);
        unique case (i % 7)
          0: f = 9'd256;
          1: f = 9'd0;
          2: f = 9'd128;
          default: f = 9'($urandom % 257);
        endcase
        if (i % 11 == 0) begin a = 8'd255; b = 8'd255; end
        if (f == 9'd256) n_one++;
        if (f == 9'd0) n_zero++;
        exp_q.push_back(model(int'(a), int'(b), int'(f)));
      end
      @(posedge clk); #1;
      if (i >= LAT - 1 && i - (LAT - 1) < N) begin
        logic [7:0] e;
        e = exp_q.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL item %0d: y=%0d expected %0d", i - LAT + 1, y, e);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_one == 0 || n_zero == 0) begin failures++; $display("FAIL mux bypass not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
