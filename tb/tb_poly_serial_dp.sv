// tb_poly_serial_dp -- drives the serial polynomial datapath directly with
// control words and checks each register write against arithmetic done
// here: X load, every M1/M2 selection, add and multiply, hold when ls=0.
module tb_poly_serial_dp;
  logic clk = 1'b0, rst = 1'b1;
  logic lx = 0, ls = 0, m2 = 0, h = 0;
  logic [1:0] m1 = 0;
  logic [7:0] dado = 0, a = 0, b = 0, c = 0;
  logic [15:0] s;
  int checks = 0, failures = 0;

  poly_serial_dp dut (.clk, .rst, .lx, .m1, .m2, .ls, .h, .dado, .a, .b, .c, .s);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] xm, sm, o1, o2, r;   // model of X and S

  initial begin
    @(negedge clk); rst = 1'b0;
    xm = 0; sm = 0;
    checks++; if (s !== 16'd0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 2000; i++) begin
      dado = 8'($urandom); a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      lx = ($urandom % 4 == 0);
      ls = ($urandom % 4 != 0);
      m1 = 2'($urandom); m2 = 1'($urandom); h = 1'($urandom);
      case (m1)
        2'd0: o1 = xm;
        2'd1: o1 = {8'd0, a};
        2'd2: o1 = {8'd0, b};
        default: o1 = {8'd0, c};
      endcase
      o2 = m2 ? sm : xm;
      r  = h ? 16'(o1 * o2) : 16'(o1 + o2);
      @(posedge clk); #1;
      if (ls) sm = r;
      if (lx) xm = {8'd0, dado};
      checks++;
      if (s !== sm) begin
        failures++;
        $display("FAIL step %0d m1=%0d m2=%0d h=%0d: s=%h expected %h", i, m1, m2, h, s, sm);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
