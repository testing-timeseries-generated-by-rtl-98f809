// key_block: holds the key and sequences the start of the generator.
//
// The key (key_t) carries the initial conditions, the coupling signs, the
// string rotations and the XOR pairing. A one-cycle `key_load` pulse captures
// it; on the following clock the block issues a one-cycle `seed` pulse that
// writes the initial conditions into the map and the rotations into the
// shift registers, and then enters the running state, where every cycle with
// `run` high is one map iteration (`step`). A new key_load at any time
// re-seeds. After reset the block holds KEY_DEFAULT but stays idle (no step)
// until the first key_load, so the map never runs from an unseeded state.
// Two assertions state that seed and step never coincide and that seed
// lasts one cycle.
//
// That the key block distributes initial conditions, parameters, shift
// settings and the XOR selection follows the generator's description; the
// parallel key word, the load/seed/run sequence and the reset behaviour are
// this design's own choices.
module key_block
  import rcm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,  // capture `key` (one-cycle pulse)
  input  key_t   key,
  input  logic   run,       // iterate while high, once seeded
  output key_t   key_q,     // the key in use
  output logic   seed,      // load initial conditions and rotations
  output logic   step,      // advance the map one iteration
  output logic   ready      // seeded; steps follow `run`
);

  typedef enum logic [1:0] {S_IDLE, S_SEED, S_RUN} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      key_q <= KEY_DEFAULT;
    end else begin
      if (key_load) begin
        key_q <= key;
        state <= S_SEED;
      end else if (state == S_SEED) begin
        state <= S_RUN;
      end
    end
  end

  assign seed  = (state == S_SEED);
  assign ready = (state == S_RUN);
  assign step  = ready && run && !key_load;

  // The map is never loaded and stepped in the same cycle, and a seed
  // pulse lasts one cycle.
  a_seed_step: assert property (@(posedge clk) disable iff (!rst_n) !(seed && step));
  a_seed_once: assert property (@(posedge clk) disable iff (!rst_n) seed && !key_load |=> !seed);

endmodule
