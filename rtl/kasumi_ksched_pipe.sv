// kasumi_ksched_pipe: four-stage pipelined key scheduler for one two-round
// module of the pipelined KASUMI core.
//
// The 128-bit key travels down the pipeline beside its data block. Each of
// the four stages holds the key of the block that the matching datapath stage
// is working on and derives from it, by wiring and a few XORs with the
// constants C1..C8, only the round-key fields that stage reads:
//   stage 1: KL, KO1, KO2, KI1, KI2 of the odd round
//   stage 2: KO3, KI3 of the odd round; KO1, KI1 of the even round
//   stage 3: KO2, KO3, KI2, KI3 of the even round
//   stage 4: KL of the even round
// The odd round is round 2*PAIR+1 and the even round 2*PAIR+2 (PAIR = 0..3).
// Four instances with PAIR = 0..3 in series serve the whole cipher.
//
// Several stage-1 fields (KL1, KO1, KO2) are plain rotations of key_in, so
// they are wires from the input.
// Timing: key_in belongs to the block entering the datapath in cycle n and
// must be valid throughout cycle n; key_out carries it in cycle n+4 for the
// next instance. rk_odd/rk_even fields are valid in the stage listed above.
// Following the document: four pipelined stages per two rounds, four
// instances in series, each stage given just the round keys it needs. Plain
// rising-edge key registers and a full key copy per stage are this design's
// choices.
module kasumi_ksched_pipe
  import kasumi_pkg::*;
#(
  parameter int unsigned PAIR = 0
) (
  input  logic        clk,
  input  logic [127:0] key_in,
  output logic [127:0] key_out,
  output round_key_t   rk_odd,
  output round_key_t   rk_even
);

  localparam int unsigned ODD_BASE  = (2 * PAIR) % 8;
  localparam int unsigned EVEN_BASE = (2 * PAIR + 1) % 8;

  key_words_t k1, k2, k3, k4;

  assign k1 = key_words_t'(key_in);

  always_ff @(posedge clk) begin
    k2      <= k1;
    k3      <= k2;
    k4      <= k3;
    key_out <= 128'(k4);
  end

  // Each stage derives a whole round-key struct and keeps only the fields it
  // serves; the other fields have no load and are removed by synthesis.
  round_key_t o1, o2, e2, e3, e4;

  always_comb begin
    o1 = round_keys(k1, KS_CONST_WORDS, ODD_BASE);
    o2 = round_keys(k2, KS_CONST_WORDS, ODD_BASE);
    e2 = round_keys(k2, KS_CONST_WORDS, EVEN_BASE);
    e3 = round_keys(k3, KS_CONST_WORDS, EVEN_BASE);
    e4 = round_keys(k4, KS_CONST_WORDS, EVEN_BASE);

    rk_odd      = o1;
    rk_odd.ko3  = o2.ko3;
    rk_odd.ki3  = o2.ki3;

    rk_even     = e3;
    rk_even.ko1 = e2.ko1;
    rk_even.ki1 = e2.ki1;
    rk_even.kl1 = e4.kl1;
    rk_even.kl2 = e4.kl2;
  end

endmodule
