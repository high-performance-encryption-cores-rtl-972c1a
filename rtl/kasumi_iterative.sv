// kasumi_iterative: iterative KASUMI core - one two-round datapath reused
// four times per block.
//
// The four-stage two-round datapath (kasumi_two_round) is not used as a
// pipeline here: one block at a time travels through it. Multiplexers at its
// L0 and R0 inputs choose between a new plaintext block and the fed-back
// output L2 || R2. A block takes 4 cycles per pass and 4 passes, 16 cycles,
// for the eight rounds; the iterative key scheduler (kasumi_ksched_iter)
// steps its rotate registers every second cycle so each pass sees the next
// round pair's keys.
//
// Interface (all on the rising edge of clk, active-low asynchronous reset):
//   key_load/key : load a 128-bit key while the core is idle (key_load has
//                  priority over a new block); the key stays for all later
//                  blocks until reloaded.
//   in_valid/in_ready/pt : a 64-bit plaintext block is taken in a cycle with
//                  both high; pt must be held valid through that cycle.
//   out_valid/ct : one-cycle pulse with the 64-bit ciphertext, 16 cycles after
//                  the block was taken. in_ready is high again in that same
//                  cycle, so back-to-back blocks give 64 bits per 16 cycles.
// Assertions check the handshake: blocks are taken only while idle and
// out_valid is a single-cycle pulse. They read rst_n synchronously (to
// disable themselves during reset) while the control flops use it as an
// asynchronous reset; a lint tool may note this double use, which is
// intended.
// Following the document: input multiplexers, feedback of L2 || R2, 16-cycle
// latency and throughput of one block per 16 cycles. The handshake, the
// pass counter and the reset are this design's choices.
module kasumi_iterative
  import kasumi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  logic [127:0] key,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] pt,
  output logic        out_valid,
  output logic [63:0] ct
);

  localparam int unsigned BLOCK_CYCLES = 16;

  logic       busy;
  logic [3:0] cnt;
  logic       accept, run;

  assign in_ready = !busy && !key_load;
  assign accept   = in_valid && in_ready;
  assign run      = accept || busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= busy && (cnt == 4'(BLOCK_CYCLES - 1));
      if (accept) begin
        busy <= 1'b1;
        cnt  <= 4'd1;
      end else if (busy) begin
        cnt <= cnt + 4'd1;
        if (cnt == 4'(BLOCK_CYCLES - 1)) busy <= 1'b0;
      end
    end
  end

  round_key_t  rk_odd, rk_even;
  logic [31:0] l_in, r_in, l_out, r_out;

  kasumi_ksched_iter u_ksched (
    .clk, .rst_n, .load(key_load && !busy), .key, .run,
    .rk_odd, .rk_even
  );

  // Input multiplexers: new plaintext in the cycle a block is taken, else the
  // fed-back output of the previous pass.
  assign l_in = accept ? pt[63:32] : l_out;
  assign r_in = accept ? pt[31:0]  : r_out;

  kasumi_two_round u_dp (
    .clk, .l_in, .r_in, .rk_odd, .rk_even, .l_out, .r_out
  );

  assign ct = {l_out, r_out};

  // Handshake rules: a block is only taken while idle, a result is a
  // single-cycle pulse, and the core is idle again when it appears.
  a_accept_idle : assert property (@(posedge clk) disable iff (!rst_n) accept |-> !busy);
  a_out_pulse   : assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid);
  a_out_idle    : assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> !busy);

endmodule
