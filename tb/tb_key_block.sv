// tb_key_block: checks the key register and the load -> seed -> run sequence.
//
// After reset the default key must be held and no step issued even with run
// high. A key_load must be followed by exactly one seed cycle, then steps
// that follow run; a key_load while running must suppress the step in that
// cycle, capture the new key and seed again.
module tb_key_block;
  import rcm_pkg::*;

  logic clk = 0, rst_n = 0, key_load = 0, run = 0;
  key_t key = '0, key_q;
  logic seed, step, ready;
  int checks = 0, failures = 0;

  key_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic key_t rand_key();
    key_t k;
    for (int i = 0; i < DIM; i++) begin
      k.x0[i]    = q_t'($urandom);
      k.shift[i] = SHW'($urandom);
    end
    k.k_neg = DIM'($urandom);
    k.pair  = pair_e'($urandom_range(0, 3));
    return k;
  endfunction

  initial begin
    key_t k;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run   = 1;
    repeat (3) begin
      @(posedge clk); #1;
      check("default key", key_q, KEY_DEFAULT);
      check("idle seed", seed, 0);
      check("idle step", step, 0);
      check("idle ready", ready, 0);
    end
    for (int n = 0; n < 100; n++) begin
      k = rand_key();
      key = k;
      key_load = 1;
      #1;
      check("no step during load", step, 0);
      @(posedge clk); #1;
      key_load = 0;
      #1;
      check("key captured", key_q, k);
      check("seed pulse", seed, 1);
      check("no step while seeding", step, 0);
      key = rand_key();
      for (int c = 0; c < 8; c++) begin
        run = 1'($urandom);
        @(posedge clk); #1;
        check("seed once", seed, 0);
        check("ready", ready, 1);
        check("step = run", step, run);
        check("key held", key_q, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
