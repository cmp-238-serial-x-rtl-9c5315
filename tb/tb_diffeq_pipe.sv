// tb_diffeq_pipe -- (1) streams a random (x, y, u, dx, a) set into the
// diffeq body pipeline every clock and checks x1, y1, u1 and x<a exactly 4
// clocks later; (2) runs four independent loops interleaved, feeding each
// result straight back in while its test holds, and checks the final y of
// every loop against the algorithm computed here.
module tb_diffeq_pipe;
  localparam int LAT = 4, NS = 3000;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [31:0] x = 0, y = 0, u = 0, dx = 0, a = 0;
  logic out_valid, teste;
  logic signed [31:0] x1, y1, u1, dx_o, a_o;
  int checks = 0, failures = 0;

  typedef struct { int x1, y1, u1; bit t; } res_t;
  res_t exp_q [$];

  diffeq_pipe dut (.clk, .rst, .in_valid, .x, .y, .u, .dx, .a, .out_valid, .x1, .y1, .u1,
                   .teste, .dx_o, .a_o);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic res_t body(input int x, y, u, dx, a);
    res_t r;
    int udx;
    udx  = u * dx;
    r.x1 = dx + x;
    r.y1 = udx + y;
    r.u1 = u - 3 * x * udx - 3 * dx * y;
    r.t  = x < a;
    return r;
  endfunction

  task automatic loop_model(input int x, y, u, dx, a, output int yr);
    res_t r;
    while (x < a) begin
      r = body(x, y, u, dx, a);
      x = r.x1; y = r.y1; u = r.u1;
    end
    yr = y;
  endtask

  initial begin
    int lx [4], ly [4], lu [4], ldx [4], la [4], ey [4];
    bit fin [4];
    int slot, nfin, cyc;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // (1) one set per clock
    for (int i = 0; i < NS + LAT; i++) begin
      in_valid = (i < NS);
      if (i < NS) begin
        x = $urandom; y = $urandom; u = $urandom; dx = $urandom; a = $urandom;
        if (i % 4 == 0) begin x = 7; a = 7; end
        exp_q.push_back(body(x, y, u, dx, a));
      end
      @(posedge clk); #1;
      if (i >= LAT - 1 && i - (LAT - 1) < NS) begin
        res_t e;
        e = exp_q.pop_front();
        checks++;
        if (!out_valid || x1 !== e.x1 || y1 !== e.y1 || u1 !== e.u1 || teste !== e.t) begin
          failures++;
          if (failures < 10) $display("FAIL item %0d", i - LAT + 1);
        end
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 1) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid stuck"); end
    // (2) four interleaved loops
    for (int rep = 0; rep < 20; rep++) begin
      for (int k = 0; k < 4; k++) begin
        lx[k] = int'($urandom % 41) - 20; la[k] = int'($urandom % 41) - 10;
        ldx[k] = int'($urandom % 4) + 1;
        lu[k] = int'($urandom % 201) - 100; ly[k] = int'($urandom % 201) - 100;
        fin[k] = 1'b0;
        loop_model(lx[k], ly[k], lu[k], ldx[k], la[k], ey[k]);
      end
      nfin = 0; cyc = 0;
      while (nfin < 4 && cyc < 4000) begin
        slot = cyc % 4;
        // an output coming back belongs to this slot's loop
        if (cyc >= 4 && out_valid && !fin[slot]) begin
          if (teste) begin
            lx[slot] = x1; ly[slot] = y1; lu[slot] = u1;
          end else begin
            fin[slot] = 1'b1; nfin++;
            checks++;
            if (ly[slot] !== ey[slot]) begin
              failures++;
              $display("FAIL loop %0d/%0d: y=%0d expected %0d", rep, slot, ly[slot], ey[slot]);
            end
          end
        end
        in_valid = !fin[slot];
        x = lx[slot]; y = ly[slot]; u = lu[slot]; dx = ldx[slot]; a = la[slot];
        @(negedge clk);
        cyc++;
      end
      in_valid = 1'b0;
      checks++;
      if (nfin != 4) begin failures++; $display("FAIL loops did not finish"); end
      repeat (LAT + 1) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
