// kasumi_ksched_iter: key scheduler of the iterative KASUMI core.
//
// Two left-rotate registers of eight 16-bit words: one holds the subkeys
// K1..K8 of the key, the other the constants C1..C8. Word 0 of both always
// belongs to the round the datapath is working on, so the round keys are pure
// wiring plus the K xor C words (kasumi_pkg::round_keys). A divide-by-two
// counter (the flop "half") lets each register position stand for two clock
// cycles before both registers rotate by one word:
//   cycles 1-2 of a pass: word 0 = K_i (odd round i). rk_odd gives all of
//                         round i; rk_even.ko1/ki1 give the first KO/KI of
//                         round i+1 (taken one word further on).
//   cycles 3-4 of a pass: word 0 = K_{i+1}. rk_even gives the rest of round
//                         i+1 (KO2, KO3, KI2, KI3, KL).
// Eight rotations per 16-cycle block bring both registers back to their
// loaded position, ready for the next block with the same key.
//
// Interface: load (while idle) loads key and the constants and clears the
// divider; run is high for each of the 16 cycles of a block, starting with the
// cycle its first pass enters the datapath. Outputs are valid as listed above.
// Following the document: the two rotate registers, the two-cycle hold and
// the split of round keys between the two halves of a pass. Using the divider
// as a clock enable for rising-edge registers, rather than as a separate
// clock, is this design's choice.
module kasumi_ksched_iter
  import kasumi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [127:0] key,
  input  logic        run,
  output round_key_t  rk_odd,
  output round_key_t  rk_even
);

  key_words_t kreg, creg;
  logic       half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kreg <= '0;
      creg <= '0;
      half <= 1'b0;
    end else if (load) begin
      kreg <= key_words_t'(key);
      creg <= KS_CONST_WORDS;
      half <= 1'b0;
    end else if (run) begin
      half <= ~half;
      if (half) begin
        kreg <= {kreg[1:7], kreg[0]};
        creg <= {creg[1:7], creg[0]};
      end
    end else begin
      half <= 1'b0;
    end
  end

  // b1 only supplies KO1/KI1 of the even round; its other fields are unused.
  round_key_t b0, b1;

  always_comb begin
    b0 = round_keys(kreg, creg, 0);
    b1 = round_keys(kreg, creg, 1);
    rk_odd      = b0;
    rk_even     = b0;
    rk_even.ko1 = b1.ko1;
    rk_even.ki1 = b1.ki1;
  end

endmodule
