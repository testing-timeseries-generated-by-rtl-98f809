// xor_block: combines the four 24-bit strings into one 48-bit output block.
//
// The strings are XORed in two pairs, and the pairing is a key setting:
// PAIR_12_34 gives {M1^M2, M3^M4} (the reference pairing), PAIR_13_24 gives
// {M1^M3, M2^M4} and PAIR_14_23 gives {M1^M4, M2^M3}; code 3 falls back to
// the reference pairing. The first pair lands in out[47:24], the second in
// out[23:0]. Purely combinational. The two-pair XOR and the 48-bit result
// follow the generator's description; the encoding of the pairing and the
// bit order of the output are this design's choices.
module xor_block
  import rcm_pkg::*;
(
  input  logic [3:0][MX_W-1:0] m,     // m[0] is M_x(1)
  input  pair_e                pair,
  output logic [2*MX_W-1:0]    out
);

  always_comb begin
    unique case (pair)
      PAIR_13_24: out = {m[0] ^ m[2], m[1] ^ m[3]};
      PAIR_14_23: out = {m[0] ^ m[3], m[1] ^ m[2]};
      default:    out = {m[0] ^ m[1], m[2] ^ m[3]};
    endcase
  end

endmodule
