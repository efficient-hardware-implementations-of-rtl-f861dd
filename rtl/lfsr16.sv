// lfsr16: pseudo-random number source for spike generation.
//
// A W-bit Fibonacci linear feedback shift register that advances once per
// cycle while `en` is high. At W = 16 it uses the maximal-length polynomial
// x^16 + x^14 + x^13 + x^11 + 1 (period 65535). The register shifts toward
// the most significant bit and the feedback enters bit 0. One LFSR is
// shared by all output neurons, as in the document; the polynomial, the
// seed load and the all-zero guard (a zero seed is replaced by 1) are this
// design's choices.
//
// Timing: `q` is the register; seed_we loads it (takes priority over en).
module lfsr16 #(
  parameter int unsigned W = spinaps_pkg::LFSR_W_D
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         seed_we,
  input  logic [W-1:0] seed,
  output logic [W-1:0] q
);

  if (W != 16) begin : g_bad_w
    $error("lfsr16: only W = 16 has its taps defined");
  end

  logic fb;
  assign fb = q[15] ^ q[13] ^ q[12] ^ q[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= W'(16'hACE1);
    else if (seed_we) q <= (seed == '0) ? W'(1) : seed;
    else if (en)      q <= {q[W-2:0], fb};
  end

endmodule
