// rcm_prng: pseudorandom generator built on a 4-D ring-coupled chaotic map.
//
// The key block seeds the map with the key's initial conditions and coupling
// signs and loads the per-string rotations into the shift registers. While
// running, the map performs one iteration per clock. From each of the four
// new coordinates the balanced bits 5..28 are cut into a 24-bit string
// (96 bits per iteration), each string is rotated by its setting, and the
// XOR block folds the four strings pairwise into one 48-bit output block.
//
// Interface: pulse key_load with a key, hold run high, and a 48-bit block
// appears in rnd with rnd_valid one clock after every iteration; rnd is
// built from the state that iteration wrote, which is also visible on x.
// fold shows, per channel, which fold-back branch the next iteration takes.
// Timing: key_load at edge t -> seed at t+1 -> first iteration at edge t+2
// (if run is high) -> first rnd_valid after it. 48 bits per clock after
// that. The structure (map, strings, shift registers, XOR block, key block),
// the Q4.28 format, the bit range, the 24-bit strings and the 48-bit output
// follow the generator's description; the handshake and latency are this
// design's own.
module rcm_prng
  import rcm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 key_load,
  input  key_t                 key,
  input  logic                 run,
  output logic                 ready,
  output logic                 rnd_valid,
  output logic [2*MX_W-1:0]    rnd,
  output q_t   [DIM-1:0]       x,      // the four timeseries
  output logic [DIM-1:0][1:0]  fold    // per channel: switch code of the next
                                       // iteration (1 -2, 2 +2, 3 pass)
);

  key_t                     key_q;
  logic                     seed, step;
  q_t   [DIM-1:0]           x_nxt;
  logic [DIM-1:0][SHW-1:0]  shift;
  logic [DIM-1:0][MX_W-1:0] m;
  logic [2*MX_W-1:0]        blk;

  key_block u_key (
    .clk, .rst_n, .key_load, .key, .run,
    .key_q, .seed, .step, .ready
  );

  rcm_map #(.P(DIM)) u_map (
    .clk, .rst_n,
    .load  (seed),
    .step  (step),
    .x0    (key_q.x0),
    .k_neg (key_q.k_neg),
    .x     (x),
    .x_nxt (x_nxt),
    .sel   (fold)
  );

  shift_regs #(.P(DIM)) u_shift (
    .clk, .rst_n,
    .load     (seed),
    .shift_in (key_q.shift),
    .shift    (shift)
  );

  for (genvar i = 0; i < DIM; i++) begin : g_str
    string_mx u_str (.x(x_nxt[i]), .shift(shift[i]), .m(m[i]));
  end

  xor_block u_xor (.m(m), .pair(key_q.pair), .out(blk));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rnd_valid <= 1'b0;
      rnd       <= '0;
    end else begin
      rnd_valid <= step;
      if (step) rnd <= blk;
    end
  end

endmodule
