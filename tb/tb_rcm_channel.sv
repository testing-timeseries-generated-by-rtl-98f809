// tb_rcm_channel: checks one map channel against a real-number model.
//
// Random states and coupling inputs in [-1, 1] (plus the edge values -1, 0,
// 1) are loaded, and the channel's next value, switch code and registered
// state after a step are compared with
//     s = 1 - 2|x| + k y,  s > 1 -> s - 2,  s < -1 -> s + 2
// evaluated in double precision, which is exact for Q4.28 values of this
// range. Every branch (subtract, add, pass) and both coupling signs must be
// hit. A watchdog ends the run if it stalls.
module tb_rcm_channel;
  import rcm_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0, k_neg = 0;
  q_t   x0 = '0, x_couple = '0, x, x_nxt;
  logic [1:0] sel;
  int checks = 0, failures = 0;
  int n_sub = 0, n_add = 0, n_pass = 0;

  rcm_channel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic q_t rand_q();
    int unsigned r = $urandom_range(0, 9);
    if (r == 0) return Q_ONE;
    if (r == 1) return Q_MINUS1;
    if (r == 2) return '0;
    return q_t'($signed($urandom_range(0, 32'h2000_0000)) - 32'sh1000_0000);
  endfunction

  function automatic real to_r(q_t v);
    return $itor(v) / 268435456.0;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    real xr, yr, s, e;
    int  exp_sel;
    q_t  exp_q;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check("reset", x, 0);
    for (int i = 0; i < 3000; i++) begin
      x0       <= rand_q();
      x_couple <= rand_q();
      k_neg    <= 1'($urandom);
      load     <= 1;
      @(posedge clk);
      load <= 0;
      #1;
      check("load", x, x0);
      xr = to_r(x);
      yr = to_r(x_couple);
      s  = 1.0 - 2.0 * (xr < 0 ? -xr : xr) + (k_neg ? -yr : yr);
      if (s > 1.0)       begin e = s - 2.0; exp_sel = 1; n_sub++;  end
      else if (s < -1.0) begin e = s + 2.0; exp_sel = 2; n_add++;  end
      else               begin e = s;       exp_sel = 3; n_pass++; end
      exp_q = q_t'($rtoi(e * 268435456.0));
      check("x_nxt", x_nxt, exp_q);
      check("sel", sel, exp_sel);
      check("range", (e >= -1.0 && e <= 1.0) ? 1 : 0, 1);
      step <= 1;
      @(posedge clk);
      step <= 0;
      #1;
      check("step", x, exp_q);
    end
    // hold: no step, no load keeps the state
    exp_q = x;
    repeat (3) @(posedge clk);
    #1 check("hold", x, exp_q);
    $display("branches: sub2=%0d add2=%0d pass=%0d", n_sub, n_add, n_pass);
    check("sub2 branch hit", n_sub > 0, 1);
    check("add2 branch hit", n_add > 0, 1);
    check("pass branch hit", n_pass > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
