// shift_regs: the register bank holding the rotation setting of each string.
//
// On `load` it captures one setting per string from the key, reduced
// modulo 24 so that every stored value is a valid rotation (0..23), and
// holds them until the next load. Reset clears all settings to 0, the
// setting the reference configuration uses. The registers and the modulo
// reduction are this design's reading of the "shift registers" block, which
// is only named in the generator's description.
module shift_regs
  import rcm_pkg::*;
#(
  parameter int unsigned P = DIM
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [P-1:0][SHW-1:0]   shift_in,
  output logic [P-1:0][SHW-1:0]   shift
);

  logic [P-1:0][SHW-1:0] sh_q;

  always_ff @(posedge clk) begin
    if (!rst_n) sh_q <= '0;
    else if (load)
      for (int i = 0; i < P; i++)
        sh_q[i] <= (shift_in[i] >= SHW'(MX_W)) ? shift_in[i] - SHW'(MX_W) : shift_in[i];
  end

  assign shift = sh_q;

endmodule
