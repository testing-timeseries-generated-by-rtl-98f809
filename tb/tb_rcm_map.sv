// tb_rcm_map: runs the ring-coupled map against a real-number model.
//
// Two instances are checked: the default 4-dimensional map seeded with the
// reference initial conditions and signs k = (+1, -1, +1, -1), and a
// 5-dimensional map with random seeds and signs, to exercise the ring
// closure for another size. Every iteration compares all coordinates and
// fold-back codes with the double-precision model (exact for Q4.28 here) and
// checks that they stay in [-1, 1]. Re-seeding and holding (step low) are
// also checked.
module tb_rcm_map;
  import rcm_pkg::*;

  localparam int P5 = 5;
  localparam int NIT = 5000;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  q_t   [DIM-1:0] x0a, xa, xna;
  logic [DIM-1:0] ka;
  logic [DIM-1:0][1:0] sela;
  q_t   [P5-1:0] x0b, xb, xnb;
  logic [P5-1:0] kb;
  logic [P5-1:0][1:0] selb;
  int checks = 0, failures = 0;
  int n_fold [3];

  rcm_map dut_a (.clk, .rst_n, .load, .step, .x0(x0a), .k_neg(ka),
                 .x(xa), .x_nxt(xna), .sel(sela));
  rcm_map #(.P(P5)) dut_b (.clk, .rst_n, .load, .step, .x0(x0b), .k_neg(kb),
                 .x(xb), .x_nxt(xnb), .sel(selb));

  always #5 clk = ~clk;

  initial begin
    repeat (4 * NIT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ma [DIM];
  real mb [P5];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint q(real v);
    return longint'($rtoi(v * 268435456.0));
  endfunction

  // one model iteration of a ring of n values; returns fold codes
  task automatic model_step(ref real m[], input logic [7:0] kn, input int n,
                            output int code[8]);
    real nx [8];
    for (int j = 0; j < n; j++) begin
      real s = 1.0 - 2.0 * (m[j] < 0 ? -m[j] : m[j]) + (kn[j] ? -m[(j+1)%n] : m[(j+1)%n]);
      if (s > 1.0)       begin nx[j] = s - 2.0; code[j] = 1; end
      else if (s < -1.0) begin nx[j] = s + 2.0; code[j] = 2; end
      else               begin nx[j] = s;       code[j] = 3; end
    end
    for (int j = 0; j < n; j++) m[j] = nx[j];
  endtask

  initial begin
    real da[], db[];
    int  code[8];
    x0a = KEY_DEFAULT.x0;
    ka  = KEY_DEFAULT.k_neg;
    for (int j = 0; j < P5; j++) begin
      x0b[j] = q_t'($signed($urandom_range(0, 32'h2000_0000)) - 32'sh1000_0000);
      kb[j]  = 1'($urandom);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      load <= 1;
      @(posedge clk);
      load <= 0;
      #1;
      da = new[DIM];
      db = new[P5];
      for (int j = 0; j < DIM; j++) begin da[j] = $itor(xa[j]) / 268435456.0; check("seed a", xa[j], x0a[j]); end
      for (int j = 0; j < P5; j++)  begin db[j] = $itor(xb[j]) / 268435456.0; check("seed b", xb[j], x0b[j]); end
      for (int it = 0; it < NIT; it++) begin
        model_step(da, 8'(ka), DIM, code);
        for (int j = 0; j < DIM; j++) begin
          check("sel a", sela[j], code[j]);
          n_fold[code[j]-1]++;
        end
        model_step(db, 8'(kb), P5, code);
        for (int j = 0; j < P5; j++) check("sel b", selb[j], code[j]);
        step <= 1;
        @(posedge clk);
        #1;
        for (int j = 0; j < DIM; j++) begin
          check("x a", xa[j], q(da[j]));
          check("range a", (xa[j] >= Q_MINUS1 && xa[j] <= Q_ONE) ? 1 : 0, 1);
        end
        for (int j = 0; j < P5; j++) check("x b", xb[j], q(db[j]));
      end
      step <= 0;
      // hold
      repeat (2) @(posedge clk);
      #1;
      for (int j = 0; j < DIM; j++) check("hold a", xa[j], q(da[j]));
      // second pass: new random seeds for both instances
      for (int j = 0; j < DIM; j++) x0a[j] = q_t'($signed($urandom_range(0, 32'h2000_0000)) - 32'sh1000_0000);
      for (int j = 0; j < P5; j++)  x0b[j] = q_t'($signed($urandom_range(0, 32'h2000_0000)) - 32'sh1000_0000);
    end
    $display("fold codes (4-D): sub2=%0d add2=%0d pass=%0d", n_fold[0], n_fold[1], n_fold[2]);
    check("all branches", (n_fold[0] > 0 && n_fold[1] > 0 && n_fold[2] > 0) ? 1 : 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
