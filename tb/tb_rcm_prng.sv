// tb_rcm_prng: end-to-end test of the generator at its default size.
//
// A cycle-accurate reference runs beside the design: it tracks the
// key_load -> seed -> run sequence, iterates the 4-D map in double precision
// (exact for Q4.28 here), cuts bits 5..28 of each coordinate, rotates them by
// the key's settings modulo 24 and XORs them in the key's pairing. Every
// cycle rnd_valid, rnd, the timeseries x and the fold codes are compared.
//
// Phase 1 uses the reference key (x0 = 0.292, -0.90258, 0.0258, 0.990258,
// k = +1 -1 +1 -1, no rotation, pairing x1^x2 / x3^x4) for a long
// uninterrupted run and also measures the balance of every bit position of
// the timeseries and the share of ones in the output. Phase 2 applies random
// keys (random seeds, signs, rotations including settings of 24 and above,
// all pairing codes), pauses run at random and re-keys in the middle of a
// run. The latency from key_load to the first output block (2 clocks) and
// the rate (one block per clock while running) are checked. Each mechanism
// (fold by -2, fold by +2, pass, every pairing, rotation, modulo reduction,
// pause, re-key while running) must occur at least once.
module tb_rcm_prng;
  import rcm_pkg::*;

  localparam int N_REF  = 30000;   // iterations with the reference key
  localparam int N_KEYS = 24;      // random keys in phase 2
  localparam int N_PER  = 800;     // cycles per random key

  logic clk = 0, rst_n = 0, key_load = 0, run = 0;
  key_t key = KEY_DEFAULT;
  logic ready, rnd_valid;
  logic [2*MX_W-1:0] rnd;
  q_t   [DIM-1:0] x;
  logic [DIM-1:0][1:0] fold;

  rcm_prng dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (N_REF + N_KEYS * N_PER + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%0d: got %0h expected %0h", what, cycles, got, exp);
    end
  endtask

  // ---------------- reference model ----------------
  typedef enum {M_IDLE, M_SEED, M_RUN} mstate_e;
  mstate_e ms = M_IDLE;
  key_t    kref = KEY_DEFAULT;
  real     mx [DIM];
  int      mcode [DIM];
  logic    exp_valid = 0;
  logic [2*MX_W-1:0] exp_rnd = '0;
  int n_code [3];
  int n_pair [4];
  int n_rot = 0, n_mod = 0, n_pause = 0, n_rekey_run = 0, n_out = 0;

  function automatic q_t qv(real v);
    return q_t'($rtoi(v * 268435456.0));
  endfunction

  function automatic void model_codes();
    for (int j = 0; j < DIM; j++) begin
      real y = kref.k_neg[j] ? -mx[(j+1)%DIM] : mx[(j+1)%DIM];
      real s = 1.0 - 2.0 * (mx[j] < 0 ? -mx[j] : mx[j]) + y;
      mcode[j] = (s > 1.0) ? 1 : (s < -1.0) ? 2 : 3;
    end
  endfunction

  function automatic void model_iterate();
    real nx [DIM];
    for (int j = 0; j < DIM; j++) begin
      real y = kref.k_neg[j] ? -mx[(j+1)%DIM] : mx[(j+1)%DIM];
      real s = 1.0 - 2.0 * (mx[j] < 0 ? -mx[j] : mx[j]) + y;
      nx[j] = (s > 1.0) ? s - 2.0 : (s < -1.0) ? s + 2.0 : s;
      n_code[(s > 1.0) ? 0 : (s < -1.0) ? 1 : 2]++;
    end
    for (int j = 0; j < DIM; j++) mx[j] = nx[j];
  endfunction

  function automatic logic [2*MX_W-1:0] model_word();
    logic [MX_W-1:0] st [DIM];
    int p;
    for (int j = 0; j < DIM; j++) begin
      q_t w = qv(mx[j]);
      int s = int'(kref.shift[j]) % 24;
      for (int i = 0; i < 24; i++) st[j][i] = w[4 + ((i - s + 24) % 24)];
    end
    p = int'(kref.pair);
    case (p)
      1:       return {st[0] ^ st[2], st[1] ^ st[3]};
      2:       return {st[0] ^ st[3], st[1] ^ st[2]};
      default: return {st[0] ^ st[1], st[2] ^ st[3]};
    endcase
  endfunction

  // Called before a rising edge with the inputs that edge will see.
  function automatic void model_edge();
    exp_valid = 0;
    if (key_load) begin
      if (ms == M_RUN && run) n_rekey_run++;
      kref = key;
      ms   = M_SEED;
    end else if (ms == M_SEED) begin
      for (int j = 0; j < DIM; j++) mx[j] = $itor(kref.x0[j]) / 268435456.0;
      ms = M_RUN;
    end else if (ms == M_RUN && run) begin
      model_iterate();
      exp_valid = 1;
      exp_rnd   = model_word();
      n_pair[int'(kref.pair)]++;
      for (int j = 0; j < DIM; j++) begin
        if (kref.shift[j] % 24 != 0) n_rot++;
        if (kref.shift[j] >= 24) n_mod++;
      end
    end else if (ms == M_RUN && !run) begin
      n_pause++;
    end
  endfunction

  // compare everything after an edge
  task automatic compare();
    check("rnd_valid", rnd_valid, exp_valid);
    if (exp_valid) begin
      check("rnd", rnd, exp_rnd);
      n_out++;
    end
    check("ready", ready, ms == M_RUN);
    if (ms == M_RUN) begin
      model_codes();
      for (int j = 0; j < DIM; j++) begin
        check("x", x[j], qv(mx[j]));
        check("fold", fold[j], mcode[j]);
      end
    end
  endtask

  // one clock: inputs were set before; model it, let the edge happen, compare
  task automatic tick();
    model_edge();
    @(posedge clk);
    #1;
    compare();
  endtask

  function automatic key_t rand_key();
    key_t k;
    for (int i = 0; i < DIM; i++) begin
      k.x0[i]    = q_t'($signed($urandom_range(0, 32'h2000_0000)) - 32'sh1000_0000);
      k.shift[i] = SHW'($urandom);
    end
    k.k_neg = DIM'($urandom);
    k.pair  = pair_e'($urandom_range(0, 3));
    return k;
  endfunction

  // ---------------- statistics of phase 1 ----------------
  longint ones_bit [DIM][QW];
  longint out_ones = 0, out_bits = 0;

  initial begin
    longint t_load, t_first;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    run   = 1;
    // idle after reset: nothing comes out before a key is loaded
    repeat (4) tick();

    // ---- phase 1: reference key, latency, rate, bit balance ----
    key      = KEY_DEFAULT;
    key_load = 1;
    tick();
    t_load   = cycles;   // edge that sampled key_load
    key_load = 0;
    t_first  = -1;
    for (int it = 0; it < N_REF + 2; it++) begin
      tick();
      if (rnd_valid && t_first < 0) t_first = cycles;
      if (rnd_valid) begin
        for (int j = 0; j < DIM; j++)
          for (int b = 0; b < QW; b++) ones_bit[j][b] += longint'(x[j][b]);
        out_ones += $countones(rnd);
        out_bits += 2 * MX_W;
      end
    end
    check("latency key_load -> first block", t_first - t_load, 2);
    check("one block per clock", n_out, N_REF + 1);
    begin
      real worst_mid, worst_top, frac, bal;
      worst_mid = 0.0;
      worst_top = 0.0;
      for (int j = 0; j < DIM; j++)
        for (int b = 0; b < QW; b++) begin
          bal = 1.0 - 2.0 * $itor(ones_bit[j][b]) / $itor(n_out);
          if (bal < 0) bal = -bal;
          if (b >= MX_LO && b < MX_LO + MX_W) begin if (bal > worst_mid) worst_mid = bal; end
          else if (b >= 28 && bal > worst_top) worst_top = bal;
        end
      frac = $itor(out_ones) / $itor(out_bits);
      $display("bit balance |N0-N1|/N: worst of bits 5..28 = %f, worst of bits 29..32 = %f",
               worst_mid, worst_top);
      $display("output: %0d bits, share of ones %f", out_bits, frac);
      check("bits 5..28 balanced", worst_mid < 0.05, 1);
      check("output ones near one half", (frac > 0.49 && frac < 0.51), 1);
    end

    // ---- phase 2: random keys, pauses, re-key while running ----
    for (int n = 0; n < N_KEYS; n++) begin
      key = rand_key();
      if (n < 4) key.pair = pair_e'(n);   // every pairing code at least once
      key_load = 1;
      tick();
      key_load = 0;
      for (int c = 0; c < N_PER; c++) begin
        run = ($urandom_range(0, 7) != 0);
        // re-key in the middle of a run now and then
        if (c == N_PER / 2 && n % 3 == 0) begin
          run = 1;
          key = rand_key();
          key_load = 1;
          tick();
          key_load = 0;
        end else begin
          tick();
        end
      end
      run = 1;
    end

    $display("folds: -2=%0d +2=%0d pass=%0d; pairings %0d/%0d/%0d/%0d; rotated strings %0d, reduced %0d; pauses %0d; re-keys while running %0d; blocks %0d",
             n_code[0], n_code[1], n_code[2], n_pair[0], n_pair[1], n_pair[2], n_pair[3],
             n_rot, n_mod, n_pause, n_rekey_run, n_out);
    check("fold -2 seen", n_code[0] > 0, 1);
    check("fold +2 seen", n_code[1] > 0, 1);
    check("pass seen", n_code[2] > 0, 1);
    for (int p = 0; p < 4; p++) check("pairing seen", n_pair[p] > 0, 1);
    check("rotation seen", n_rot > 0, 1);
    check("modulo reduction seen", n_mod > 0, 1);
    check("pause seen", n_pause > 0, 1);
    check("re-key while running seen", n_rekey_run > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
