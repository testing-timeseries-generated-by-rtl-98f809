// tb_shift_regs: checks loading, holding and modulo-24 reduction of the
// rotation settings, and their reset to 0.
module tb_shift_regs;
  import rcm_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  logic [DIM-1:0][SHW-1:0] shift_in = '0, shift;
  int checks = 0, failures = 0;

  shift_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [DIM-1:0][SHW-1:0] exp;
    shift_in = '1;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < DIM; i++) check("reset", shift[i], 0);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < DIM; i++) shift_in[i] = SHW'($urandom);
      load = 1;
      @(posedge clk);
      #1;
      load = 0;
      for (int i = 0; i < DIM; i++) begin
        exp[i] = SHW'(shift_in[i] % 24);
        check("load", shift[i], exp[i]);
      end
      // change the input without load: the settings must hold
      for (int i = 0; i < DIM; i++) shift_in[i] = SHW'($urandom);
      @(posedge clk);
      #1;
      for (int i = 0; i < DIM; i++) check("hold", shift[i], exp[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
