// tb_rcm_prng_stats: statistical evaluation of the generator's output.
//
// The generator runs with the reference key (x0 = 0.292, -0.90258, 0.0258,
// 0.990258, k = +1 -1 +1 -1, no rotation, pairing x1^x2 / x3^x4) and its
// 48-bit blocks are read as one bit stream, most significant bit first. The
// stream is cut into N_SEQ sequences of 10^6 bits; on each, two tests of the
// NIST SP 800-22 suite are computed:
//   frequency (monobit): S = sum(2b - 1), p = erfc(|S| / sqrt(2n))
//   runs: pi = ones / n, V = number of runs,
//         p = erfc(|V - 2n pi (1 - pi)| / (2 sqrt(2n) pi (1 - pi)))
//         (p = 0 when the frequency prerequisite |pi - 1/2| >= 2/sqrt(n) fails)
// A sequence passes a test at p >= 0.01; the share passing must reach
// 0.99 - 3 sqrt(0.99 * 0.01 / N_SEQ), the usual acceptance bound.
// Alongside, the first N_HIST iterations of each timeseries x^(1..4) are
// sorted into 100 equal bins over [-1, 1]; every bin must hold within 5% of
// the mean count (a uniform distribution). The design's exact per-cycle
// behaviour is checked by tb_rcm_prng; this bench only measures statistics.
module tb_rcm_prng_stats;
  import rcm_pkg::*;

  localparam int SEQ_BITS = 1_000_000;
  localparam int N_SEQ    = 1000;
  localparam int N_HIST   = 10_000_000;
  localparam longint N_IT = (longint'(SEQ_BITS) * N_SEQ + 47) / 48;

  logic clk = 0, rst_n = 0, key_load = 0, run = 0;
  key_t key = KEY_DEFAULT;
  logic ready, rnd_valid;
  logic [2*MX_W-1:0] rnd;
  q_t   [DIM-1:0] x;
  logic [DIM-1:0][1:0] fold;

  rcm_prng dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (N_IT + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // complementary error function, rational approximation with fractional
  // error below 1.2e-7 everywhere
  function automatic real erfc(real z);
    real t, ans, a;
    a   = z < 0 ? -z : z;
    t   = 1.0 / (1.0 + 0.5 * a);
    ans = t * $exp(-a * a - 1.26551223 + t * (1.00002368 + t * (0.37409196 + t * (0.09678418 +
          t * (-0.18628806 + t * (0.27886807 + t * (-1.13520398 + t * (1.48851587 +
          t * (-0.82215223 + t * 0.17087277)))))))));
    return z >= 0 ? ans : 2.0 - ans;
  endfunction

  // per-sequence state
  longint ones = 0, nbits = 0, runs = 0;
  logic   prev = 0;
  int     seq = 0, pass_freq = 0, pass_runs = 0;
  real    pmin_freq = 1.0, pmin_runs = 1.0;
  longint hist [DIM][100];
  longint n_hist = 0;

  function automatic void end_sequence();
    real n, s, pf, pi, pr;
    n  = $itor(nbits);
    s  = 2.0 * $itor(ones) - n;
    pf = erfc((s < 0 ? -s : s) / $sqrt(2.0 * n));
    pi = $itor(ones) / n;
    if ((pi - 0.5 < 0 ? 0.5 - pi : pi - 0.5) >= 2.0 / $sqrt(n)) pr = 0.0;
    else begin
      real d = $itor(runs) - 2.0 * n * pi * (1.0 - pi);
      pr = erfc((d < 0 ? -d : d) / (2.0 * $sqrt(2.0 * n) * pi * (1.0 - pi)));
    end
    if (pf >= 0.01) pass_freq++;
    if (pr >= 0.01) pass_runs++;
    if (pf < pmin_freq) pmin_freq = pf;
    if (pr < pmin_runs) pmin_runs = pr;
    seq++;
    ones  = 0;
    nbits = 0;
    runs  = 0;
  endfunction

  always @(posedge clk) begin
    longint b;
    if (rnd_valid && seq < N_SEQ) begin
      for (int i = 2 * MX_W - 1; i >= 0; i--) begin
        if (nbits == 0) runs = 1;
        else if (rnd[i] != prev) runs++;
        prev = rnd[i];
        ones += longint'(rnd[i]);
        nbits++;
        if (nbits == SEQ_BITS) end_sequence();
        if (seq == N_SEQ) break;
      end
    end
    if (rnd_valid && n_hist < N_HIST) begin
      for (int j = 0; j < DIM; j++) begin
        // bin = floor((x + 1) * 50), x in Q4.28; x = 1 goes to the last bin
        b = ((longint'(x[j]) + 64'sd268435456) * 50) >>> 28;
        if (b > 99) b = 99;
        if (b < 0) b = 0;
        hist[j][b]++;
      end
      n_hist++;
    end
  end

  initial begin
    real bound, mean, dev, worst;
    repeat (3) @(posedge clk);
    rst_n    <= 1;
    run      <= 1;
    key_load <= 1;
    @(posedge clk);
    key_load <= 0;
    wait (seq == N_SEQ && n_hist >= N_HIST);
    bound = 0.99 - 3.0 * $sqrt(0.99 * 0.01 / $itor(N_SEQ));
    $display("%0d sequences of %0d bits: frequency passed %0d (min p %f), runs passed %0d (min p %f), bound %f",
             N_SEQ, SEQ_BITS, pass_freq, pmin_freq, pass_runs, pmin_runs, bound);
    checks++;
    if ($itor(pass_freq) / $itor(N_SEQ) < bound) failures++;
    checks++;
    if ($itor(pass_runs) / $itor(N_SEQ) < bound) failures++;
    mean  = $itor(N_HIST) / 100.0;
    worst = 0.0;
    for (int j = 0; j < DIM; j++)
      for (int b = 0; b < 100; b++) begin
        dev = ($itor(hist[j][b]) - mean) / mean;
        if (dev < 0) dev = -dev;
        if (dev > worst) worst = dev;
      end
    $display("histogram of %0d iterations per channel, 100 bins: mean %0.0f, worst deviation %f",
             N_HIST, mean, worst);
    checks++;
    if (worst > 0.05) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
