// tb_string_mx: checks the string extraction and rotation.
//
// For random words and every shift setting 0..31 the output is compared with
// a bit-by-bit model: output bit i is word bit 4 + ((i - s) mod 24), with s
// the setting reduced modulo 24, i.e. bits 5..28 rotated left by s.
module tb_string_mx;
  import rcm_pkg::*;

  q_t              x;
  logic [SHW-1:0]  shift;
  logic [MX_W-1:0] m;
  int checks = 0, failures = 0;

  string_mx dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MX_W-1:0] exp;
    int s;
    for (int n = 0; n < 400; n++) begin
      x = q_t'($urandom);
      for (int sh = 0; sh < 32; sh++) begin
        shift = SHW'(sh);
        #1;
        s = sh % 24;
        for (int i = 0; i < 24; i++) exp[i] = x[4 + ((i - s + 24) % 24)];
        checks++;
        if (m !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h shift=%0d got %h expected %h", x, sh, m, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
