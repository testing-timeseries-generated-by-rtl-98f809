// string_mx: forms the string M_x taken from one timeseries word.
//
// The 24 balanced bits 5..28 of the Q4.28 word (word[27:4]) are cut out,
// dropping the 4 least significant bits and the 4 sign/integer bits, and the
// 24-bit string is rotated left by the channel's shift setting (taken modulo
// 24). With shift 0 the string is the plain bit field. Purely combinational.
// The bit range and width follow the generator's description; reading the
// "shift" as a cyclic rotation of the 24-bit field, and its direction, are
// this design's own choices.
module string_mx
  import rcm_pkg::*;
(
  input  q_t              x,      // timeseries word, Q4.28
  input  logic [SHW-1:0]  shift,  // rotation amount, reduced modulo 24
  output logic [MX_W-1:0] m       // string M_x
);

  logic [MX_W-1:0]   field;
  logic [2*MX_W-1:0] dbl;
  logic [SHW-1:0]    amt;

  always_comb begin
    field = x[MX_LO +: MX_W];
    amt   = (shift >= SHW'(MX_W)) ? shift - SHW'(MX_W) : shift;
    dbl   = {field, field} << amt;
    m     = dbl[2*MX_W-1 -: MX_W];
  end

endmodule
