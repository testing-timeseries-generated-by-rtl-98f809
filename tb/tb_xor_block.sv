// tb_xor_block: checks the pairwise XOR for every pairing code.
//
// Random strings are applied with each pairing code 0..3 and the 48-bit
// block is compared with the pairs expected for that code (code 3 behaves
// like the reference pairing x1^x2 / x3^x4).
module tb_xor_block;
  import rcm_pkg::*;

  logic [3:0][MX_W-1:0]  m;
  pair_e                 pair;
  logic [2*MX_W-1:0]     out;
  int checks = 0, failures = 0;

  xor_block dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MX_W-1:0] hi, lo;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) m[i] = MX_W'($urandom);
      for (int c = 0; c < 4; c++) begin
        pair = pair_e'(c);
        #1;
        case (c)
          1:       begin hi = m[0] ^ m[2]; lo = m[1] ^ m[3]; end
          2:       begin hi = m[0] ^ m[3]; lo = m[1] ^ m[2]; end
          default: begin hi = m[0] ^ m[1]; lo = m[2] ^ m[3]; end
        endcase
        checks++;
        if (out !== {hi, lo}) begin
          failures++;
          if (failures < 10) $display("FAIL pair=%0d got %h expected %h", c, out, {hi, lo});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
