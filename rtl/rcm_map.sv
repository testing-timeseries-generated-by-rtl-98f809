// rcm_map: the p-dimensional ring-coupled map with the fold-back rule.
//
// P channels (rcm_channel) are closed into a ring: channel j is coupled to
// channel j+1 and the last channel to the first, so that
//     x_{n+1}^(j) = 1 - 2|x_n^(j)| + k^(j) x_n^(j+1),  j = 1..P,  x^(P+1) = x^(1)
// with values leaving [-1, 1] folded back by +-2. The default P = 4 is the
// configuration the generator uses. All channels advance together, one
// iteration per clock while `step` is high; `load` seeds all of them from
// x0. The outputs are the P timeseries (x), the values the next step will
// write (x_nxt), and each channel's fold-back code (sel) for observation.
module rcm_map
  import rcm_pkg::*;
#(
  parameter int unsigned P = DIM
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               step,
  input  q_t   [P-1:0]       x0,
  input  logic [P-1:0]       k_neg,
  output q_t   [P-1:0]       x,
  output q_t   [P-1:0]       x_nxt,
  output logic [P-1:0][1:0]  sel
);

  for (genvar j = 0; j < P; j++) begin : g_ch
    rcm_channel u_ch (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (load),
      .step     (step),
      .x0       (x0[j]),
      .k_neg    (k_neg[j]),
      .x_couple (x[(j + 1) % P]),
      .x        (x[j]),
      .x_nxt    (x_nxt[j]),
      .sel      (sel[j])
    );
  end

endmodule
