// tb_cmp238_top -- end-to-end test of the whole top at its default sizes.
// All examples run at the same time from one clock: each is driven by its
// own thread with random operands and checked against arithmetic done here.
// Every mechanism the examples contain is counted and must occur:
//   serial FSM run, combinational one-clock result, counter pass and its
//   repeat, parallel and serial F(x), carry across the adder's pipeline cut,
//   both blend mux bypasses (F = 1.0 and F = 0), a streamed array product,
//   diffeq loop exit in all four versions (including zero iterations) and
//   the pipeline's interleaved loops with result feedback.
module tb_cmp238_top;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;

  logic        e1s_start = 0, e1c_start = 0, e1v_start = 0, e2p_start = 0, e2s_start = 0;
  logic [7:0]  e1s_x = 0, e1s_a = 0, e1s_b = 0, e1s_c = 0;
  logic [7:0]  e1c_x = 0, e1c_a = 0, e1c_b = 0, e1c_c = 0;
  logic [7:0]  e1v_x = 0, e1v_a = 0, e1v_b = 0, e1v_c = 0;
  logic [7:0]  e2p_x = 0, e2p_a = 0, e2p_b = 0, e2p_c = 0;
  logic [7:0]  e2s_x = 0, e2s_a = 0, e2s_b = 0, e2s_c = 0;
  logic [15:0] e1s_s, e1c_s, e1v_s, e2p_f, e2s_f;
  logic        e1s_done, e1v_done, e2p_done, e2s_done;
  logic [31:0] add_a = 0, add_b = 0, add_sum;
  logic [7:0]  bl_a = 0, bl_b = 0, bl_y;
  logic [8:0]  bl_f = 0;
  logic        dc_start = 0, ds_start = 0, dp_in_valid = 0;
  logic signed [31:0] dc_x = 0, dc_y = 0, dc_u = 0, dc_dx = 0, dc_a = 0, dc_yout;
  logic signed [31:0] ds_x = 0, ds_y = 0, ds_u = 0, ds_dx = 0, ds_a = 0, ds_yout;
  logic signed [31:0] dp_x = 0, dp_y = 0, dp_u = 0, dp_dx = 0, dp_a = 0;
  logic signed [31:0] dp_x1, dp_y1, dp_u1, dp_dx_o, dp_a_o;
  logic        ds1_start = 0;
  logic signed [31:0] ds1_x = 0, ds1_y = 0, ds1_u = 0, ds1_dx = 0, ds1_a = 0, ds1_yout;
  logic        ds1_done;
  logic [15:0] ds1_iters;
  logic        dc_done, ds_done, dp_out_valid, dp_teste;
  logic [15:0] dc_iters, ds_iters;
  logic [3:0]  mu_a = 0, mu_b = 0;
  logic [7:0]  mu_p;

  cmp238_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  typedef enum int {M_E1S, M_E1C, M_E1V, M_E1V_REP, M_E2P, M_E2S, M_ADD_CARRY, M_BL_ONE,
                    M_BL_ZERO, M_MUL, M_DC_EXIT, M_DC_ZERO, M_DS_EXIT, M_DS1_EXIT, M_DP_STREAM,
                    M_DP_LOOP, M_NUM} mech_t;
  int mech [M_NUM];
  string mname [M_NUM] = '{"serial FSM run", "combinational result", "counter pass",
    "counter repeat", "parallel F(x)", "serial F(x)", "carry across adder cut",
    "blend bypass F=1.0", "blend bypass F=0", "array product", "diffeq comb exit",
    "diffeq zero iterations", "diffeq 4-state exit", "diffeq 1-multiplier exit", "diffeq pipe streamed",
    "diffeq pipe loop"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] poly(input logic [7:0] x, a, b, c);
    return 16'(32'(a) * x * x + 32'(b) * x + c);
  endfunction
  function automatic logic [15:0] f2(input logic [7:0] x, a, b, c);
    logic [15:0] t;
    t = 16'(32'(a) * x * x) + 16'(b);
    return (t >> 2) + 16'(c);
  endfunction
  // reference: forward-Euler steps on 32-bit wrapping ints
  task automatic diffeq(input int x, y, u, dx, a, output int yr, output int k);
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

  localparam int RUNS = 40;
  int threads_done = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    fork
      // ---- Example 1, serial ----
      for (int r = 0; r < RUNS; r++) begin
        int n;
        logic [15:0] e;
        e1s_x = 8'($urandom); e1s_a = 8'($urandom); e1s_b = 8'($urandom); e1s_c = 8'($urandom);
        e = poly(e1s_x, e1s_a, e1s_b, e1s_c);
        e1s_start = 1; @(negedge clk); e1s_start = 0;
        n = 1;
        while (!e1s_done && n < 100) begin @(negedge clk); n++; end
        check(n == 6 && e1s_s == e, "example 1 serial");
        mech[M_E1S]++;
        @(negedge clk);
      end
      // ---- Example 1, combinational ----
      for (int r = 0; r < RUNS; r++) begin
        e1c_x = 8'($urandom); e1c_a = 8'($urandom); e1c_b = 8'($urandom); e1c_c = 8'($urandom);
        e1c_start = 1; @(negedge clk); e1c_start = 0; @(negedge clk);
        check(e1c_s == poly(e1c_x, e1c_a, e1c_b, e1c_c), "example 1 combinational");
        mech[M_E1C]++;
      end
      // ---- Example 1, counter ----
      for (int r = 0; r < RUNS; r++) begin
        int n;
        logic [15:0] e;
        e1v_x = 8'($urandom); e1v_a = 8'($urandom); e1v_b = 8'($urandom); e1v_c = 8'($urandom);
        e = poly(e1v_x, e1v_a, e1v_b, e1v_c);
        e1v_start = 1; @(negedge clk); e1v_start = 0;
        n = 0;
        while (!e1v_done && n < 100) begin @(negedge clk); n++; end
        check(n == 5 && e1v_s == e, "example 1 counter");
        mech[M_E1V]++;
        repeat (4) @(negedge clk);
        check(e1v_done && e1v_s == e, "example 1 counter repeat");
        mech[M_E1V_REP]++;
      end
      // ---- Example 2 ----
      for (int r = 0; r < RUNS; r++) begin
        e2p_x = 8'($urandom); e2p_a = 8'($urandom); e2p_b = 8'($urandom); e2p_c = 8'($urandom);
        e2p_start = 1; @(negedge clk); e2p_start = 0; @(negedge clk);
        check(e2p_done && e2p_f == f2(e2p_x, e2p_a, e2p_b, e2p_c), "example 2 parallel");
        mech[M_E2P]++;
      end
      for (int r = 0; r < RUNS; r++) begin
        int n;
        e2s_x = 8'($urandom); e2s_a = 8'($urandom); e2s_b = 8'($urandom); e2s_c = 8'($urandom);
        e2s_start = 1; @(negedge clk); e2s_start = 0;
        n = 0;
        while (!e2s_done && n < 100) begin @(negedge clk); n++; end
        check(n == 6 && e2s_f == f2(e2s_x, e2s_a, e2s_b, e2s_c), "example 2 serial");
        mech[M_E2S]++;
        @(negedge clk);
      end
      // ---- pipelined adder, blend and array multiplier: streams ----
      begin
        logic [31:0] qa [$];
        logic [7:0]  qb [$], qm [$];
        for (int i = 0; i < 1000 + 4; i++) begin
          if (i < 1000) begin
            int pa, pb, s;
            add_a = (i % 3 == 0) ? 32'h0000_FFF0 + 32'($urandom % 16) : $urandom;
            add_b = $urandom;
            if ((33'(add_a[15:0]) + 33'(add_b[15:0])) > 33'h0_FFFF) mech[M_ADD_CARRY]++;
            qa.push_back(add_a + add_b);
            bl_a = 8'($urandom); bl_b = 8'($urandom);
            bl_f = (i % 5 == 0) ? 9'd256 : (i % 5 == 1) ? 9'd0 : 9'($urandom % 257);
            if (bl_f == 9'd256) mech[M_BL_ONE]++;
            if (bl_f == 9'd0) mech[M_BL_ZERO]++;
            pa = (bl_f == 256) ? int'(bl_a) : int'(bl_a) * int'(bl_f) / 256;
            pb = (bl_f == 0) ? int'(bl_b) : int'(bl_b) * (256 - int'(bl_f)) / 256;
            s = pa + pb;
            qb.push_back(s > 255 ? 8'd255 : 8'(s));
            mu_a = 4'($urandom); mu_b = 4'($urandom);
            qm.push_back(8'(mu_a * mu_b));
          end
          @(posedge clk); #1;
          if (i >= 2 && qa.size() > 0 && i < 1002) begin
            check(add_sum == qa.pop_front(), "pipelined adder");
            check(bl_y == qb.pop_front(), "blend");
          end
          if (i >= 3 && qm.size() > 0) begin
            check(mu_p == qm.pop_front(), "array multiplier");
            mech[M_MUL]++;
          end
          @(negedge clk);
        end
      end
      // ---- diffeq, combinational and four-state ----
      for (int r = 0; r < RUNS; r++) begin
        int ey, ek, n;
        dc_x = int'($urandom % 41) - 20; dc_a = int'($urandom % 41) - 10;
        dc_dx = int'($urandom % 5) + 1;
        dc_u = int'($urandom % 201) - 100; dc_y = int'($urandom % 201) - 100;
        if (r == 0) dc_a = dc_x;
        ds_x = dc_x; ds_y = dc_y; ds_u = dc_u; ds_dx = dc_dx; ds_a = dc_a;
        ds1_x = dc_x; ds1_y = dc_y; ds1_u = dc_u; ds1_dx = dc_dx; ds1_a = dc_a;
        diffeq(dc_x, dc_y, dc_u, dc_dx, dc_a, ey, ek);
        if (ek == 0) mech[M_DC_ZERO]++;
        dc_start = 1; ds_start = 1; ds1_start = 1;
        @(negedge clk);
        dc_start = 0; ds_start = 0; ds1_start = 0;
        n = 0;
        while (!ds1_done && n < 3000) begin
          @(negedge clk); n++;
          if (n == ek + 1) begin
            check(dc_done && dc_yout == ey && dc_iters == 16'(ek), "diffeq combinational");
            mech[M_DC_EXIT]++;
          end
          if (n == 4 * ek + 4) begin
            check(ds_done && ds_yout == ey && ds_iters == 16'(ek), "diffeq four-state");
            mech[M_DS_EXIT]++;
          end
        end
        check(n == 6 * ek + 6 && ds1_yout == ey && ds1_iters == 16'(ek), "diffeq one-multiplier");
        mech[M_DS1_EXIT]++;
      end
      // ---- diffeq pipeline: four interleaved loops ----
      for (int rep = 0; rep < 10; rep++) begin
        int lx [4], ly [4], lu [4], ldx [4], la [4], ey [4], ek;
        bit fin [4];
        int nfin, cyc, slot;
        for (int k = 0; k < 4; k++) begin
          lx[k] = int'($urandom % 41) - 20; la[k] = int'($urandom % 41) - 10;
          ldx[k] = int'($urandom % 4) + 1;
          lu[k] = int'($urandom % 201) - 100; ly[k] = int'($urandom % 201) - 100;
          fin[k] = 0;
          diffeq(lx[k], ly[k], lu[k], ldx[k], la[k], ey[k], ek);
        end
        nfin = 0; cyc = 0;
        while (nfin < 4 && cyc < 4000) begin
          slot = cyc % 4;
          if (cyc >= 4 && dp_out_valid && !fin[slot]) begin
            if (dp_teste) begin
              lx[slot] = dp_x1; ly[slot] = dp_y1; lu[slot] = dp_u1;
            end else begin
              fin[slot] = 1; nfin++;
              check(ly[slot] == ey[slot], "diffeq pipeline loop");
              mech[M_DP_LOOP]++;
            end
          end
          dp_in_valid = !fin[slot];
          if (!fin[slot]) mech[M_DP_STREAM]++;
          dp_x = lx[slot]; dp_y = ly[slot]; dp_u = lu[slot]; dp_dx = ldx[slot]; dp_a = la[slot];
          @(negedge clk);
          cyc++;
        end
        dp_in_valid = 0;
        check(nfin == 4, "diffeq pipeline loops finish");
        repeat (5) @(negedge clk);
      end
    join
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-26s happened %0d times", mname[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mname[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
