// kasumi_pipelined: fully pipelined KASUMI core - one 64-bit block per clock
// cycle, 16 cycles of latency.
//
// Four identical four-stage two-round datapaths (kasumi_two_round) are
// chained to cover rounds 1-2, 3-4, 5-6 and 7-8. Beside them four four-stage
// key schedulers (kasumi_ksched_pipe, PAIR = 0..3) carry each block's key
// down the pipeline and hand every datapath stage the round keys it needs, so
// every block may use its own key. Up to sixteen blocks are in flight.
// A valid bit travels with the blocks.
//
// Interface (rising edge of clk, active-low asynchronous reset of the valid
// bits only):
//   in_valid/pt/key : a plaintext block and its key, taken every cycle
//                     in_valid is high; both must be held through the cycle.
//   out_valid/ct    : the ciphertext of the block taken 16 cycles earlier.
// There is no back-pressure: the pipeline accepts a block every cycle.
// Following the document: the 4 x 4-stage structure, 16-cycle latency,
// one block per cycle and the series key schedulers. The valid bit and the
// reset are this design's choices.
module kasumi_pipelined
  import kasumi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] pt,
  input  logic [127:0] key,
  output logic        out_valid,
  output logic [63:0] ct
);

  localparam int unsigned PAIRS   = 4;
  localparam int unsigned LATENCY = 4 * PAIRS;

  logic [31:0]  l [PAIRS+1];
  logic [31:0]  r [PAIRS+1];
  logic [127:0] k [PAIRS+1];

  assign l[0] = pt[63:32];
  assign r[0] = pt[31:0];
  assign k[0] = key;

  for (genvar p = 0; p < PAIRS; p++) begin : g_pair
    round_key_t rk_odd, rk_even;

    kasumi_ksched_pipe #(.PAIR(p)) u_ks (
      .clk, .key_in(k[p]), .key_out(k[p+1]), .rk_odd, .rk_even
    );

    kasumi_two_round u_dp (
      .clk, .l_in(l[p]), .r_in(r[p]), .rk_odd, .rk_even,
      .l_out(l[p+1]), .r_out(r[p+1])
    );
  end

  assign ct = {l[PAIRS], r[PAIRS]};

  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end

  assign out_valid = vpipe[LATENCY-1];

endmodule
