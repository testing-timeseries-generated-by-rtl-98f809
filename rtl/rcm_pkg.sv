// rcm_pkg: types and constants shared by the ring-coupled map PRNG.
//
// Numbers are Q4.28 two's-complement fixed point: a 32-bit word whose value
// is the signed integer divided by 2^28 (4 integer bits including the sign,
// 28 fraction bits), the format the generator is built around. The map keeps
// every coordinate in [-1, 1], so the sums it forms, in [-2, 2], never
// overflow this format.
//
// Bit positions follow a 1-based numbering from the least significant bit
// (bit 1 = word[0], bit 32 = word[31]). The output strings use bits 5..28,
// i.e. word[27:4], 24 bits per coordinate.
//
// The default key reproduces the reference configuration the generator was
// evaluated with: x0 = (0.292, -0.90258, 0.0258, 0.990258), k = (+1, -1, +1, -1),
// all string rotations 0, XOR pairing x1^x2 / x3^x4. The Q4.28 words below
// are round(x0 * 2^28).
package rcm_pkg;

  localparam int unsigned QW     = 32;  // Q4.28 word width
  localparam int unsigned QFRAC  = 28;  // fraction bits
  localparam int unsigned DIM    = 4;   // map dimension p
  localparam int unsigned MX_LO  = 4;   // word index of bit 5
  localparam int unsigned MX_W   = 24;  // string width M_x (bits 5..28)
  localparam int unsigned SHW    = 5;   // width of a rotation setting (0..23)

  typedef logic signed [QW-1:0] q_t;

  localparam q_t Q_ONE     = q_t'(32'sh1000_0000);  //  1.0
  localparam q_t Q_MINUS1  = q_t'(32'shF000_0000);  // -1.0
  localparam q_t Q_TWO     = q_t'(32'sh2000_0000);  //  2.0

  // XOR block pairing of the four strings into two 24-bit halves.
  typedef enum logic [1:0] {
    PAIR_12_34 = 2'd0,  // {M1^M2, M3^M4}
    PAIR_13_24 = 2'd1,  // {M1^M3, M2^M4}
    PAIR_14_23 = 2'd2   // {M1^M4, M2^M3}; code 3 behaves as PAIR_12_34
  } pair_e;

  // Everything the key carries: initial conditions, coupling signs,
  // string rotations and the XOR pairing.
  typedef struct packed {
    q_t       [DIM-1:0] x0;     // initial conditions, x0[0] is x^(1)
    logic     [DIM-1:0] k_neg;  // 1: k^(i) = -1, 0: k^(i) = +1
    logic [DIM-1:0][SHW-1:0] shift;  // rotation of each string, mod 24
    pair_e              pair;   // XOR block pairing
  } key_t;

  localparam key_t KEY_DEFAULT = '{
    x0:    {q_t'(32'sh0FD8_18C6),   // x^(4) =  0.990258
            q_t'(32'sh0069_AD43),   // x^(3) =  0.0258
            q_t'(32'shF18F_0846),   // x^(2) = -0.90258
            q_t'(32'sh04AC_0831)},  // x^(1) =  0.292
    k_neg: 4'b1010,                 // k = (+1, -1, +1, -1)
    shift: '0,
    pair:  PAIR_12_34
  };

endpackage
