// tb_adder8 -- exhaustive check of the 8-bit ripple slice: every a, b and
// carry in, sum and carry out against a 9-bit addition.
module tb_adder8;
  logic [7:0] a, b, s;
  logic ci, co;
  int checks = 0, failures = 0;

  adder8 dut (.a, .b, .ci, .s, .co);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int k = 0; k < 2; k++) begin
          a = 8'(i); b = 8'(j); ci = 1'(k);
          #1;
          checks++;
          if ({co, s} !== 9'(i + j + k)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d = %0d", i, j, k, {co, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
