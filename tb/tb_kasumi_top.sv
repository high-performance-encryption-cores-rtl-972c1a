// tb_kasumi_top: end-to-end test of both KASUMI cores in kasumi_top at their
// full, default configuration, running at the same time.
//   pipelined core: the specification's test vector, then 400 cycles of
//     traffic with a fresh random key per block, including a run that fills
//     all 16 stages, and random bubbles.
//   iterative core: the test vector under the loaded key, a stream of blocks
//     offered back to back (each stalled by in_ready until the previous one
//     finishes), random gaps, and a key reload.
// Every ciphertext is compared with the reference model and its latency
// (16 cycles) is checked. Each mechanism is counted and must occur at least
// once: pipeline full (16 blocks in flight), pipeline bubble, key change
// between consecutive pipelined blocks, iterative feedback pass, iterative
// input stall, back-to-back iterative hand-over, iterative key reload.
module tb_kasumi_top;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n = 1'b0;
  logic         p_in_valid, p_out_valid;
  logic [63:0]  p_pt, p_ct;
  logic [127:0] p_key;
  logic         i_key_load, i_in_valid, i_in_ready, i_out_valid;
  logic [127:0] i_key;
  logic [63:0]  i_pt, i_ct;

  kasumi_top dut (.*);

  int checks = 0, failures = 0;
  typedef struct { longint t; logic [63:0] exp; } pend_t;
  pend_t pq [$];
  pend_t iq [$];

  // mechanism counters
  int n_full = 0, n_bubble = 0, n_keychg = 0, n_feedback = 0;
  int n_stall = 0, n_handover = 0, n_reload = 0;
  int p_outs = 0, i_outs = 0, in_flight = 0, i_age = 0;
  logic [127:0] last_p_key;
  bit           last_p_valid = 1'b0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  // Output checkers and counters. Latency = rising edges from the one that
  // takes a block to the one that registers its result, both counted.
  always @(posedge clk) begin
    longint tnow;
    pend_t p;
    tnow = $time;
    // sampled at the edge: what the design sees in the cycle just ending
    if (rst_n) begin
      if (p_in_valid) begin
        in_flight++;
        if (last_p_valid && p_key != last_p_key) n_keychg++;
      end else if (last_p_valid) n_bubble++;
      last_p_valid = p_in_valid;
      last_p_key   = p_key;
      if (i_in_valid && !i_in_ready) n_stall++;
      if (i_in_valid && i_in_ready && i_out_valid) n_handover++;
      if (i_key_load) n_reload++;
      // cycles since the iterative core took its block: passes 2-4 start
      // from the fed-back L2||R2 at 4, 8 and 12
      if (i_in_valid && i_in_ready) i_age = 1;
      else if (i_age > 0) begin
        if (i_age == 4 || i_age == 8 || i_age == 12) n_feedback++;
        i_age = (i_age == 15) ? 0 : i_age + 1;
      end
      // blocks taken at this edge and the 15 before it: all 16 stages busy
      if (in_flight >= 16) n_full++;
    end
    #2;
    if (rst_n && p_out_valid) begin
      checks++; p_outs++; in_flight--;
      if (pq.size() == 0) fail("pipelined: unexpected output");
      else begin
        p = pq.pop_front();
        if (p_ct !== p.exp || (tnow - p.t) / 10 + 1 != 16)
          fail($sformatf("pipelined ct %h exp %h latency %0d", p_ct, p.exp, (tnow - p.t) / 10 + 1));
      end
    end
    if (rst_n && i_out_valid) begin
      checks++; i_outs++;
      if (iq.size() == 0) fail("iterative: unexpected output");
      else begin
        p = iq.pop_front();
        if (i_ct !== p.exp || (tnow - p.t) / 10 + 1 != 16)
          fail($sformatf("iterative ct %h exp %h latency %0d", i_ct, p.exp, (tnow - p.t) / 10 + 1));
      end
    end
  end

  // ---- pipelined traffic ---------------------------------------------------
  task automatic p_send(input logic [127:0] k, input logic [63:0] x);
    #1;
    p_in_valid = 1'b1; p_key = k; p_pt = x;
    @(posedge clk);
    pq.push_back('{$time, kasumi(k, x)});
  endtask

  task automatic p_idle();
    #1;
    p_in_valid = 1'b0;
    @(posedge clk);
  endtask

  bit p_done = 1'b0, i_done = 1'b0;

  initial begin
    wait (rst_n);
    @(posedge clk);
    p_send(TV_KEY, TV_PT);
    repeat (3) p_idle();
    for (int i = 0; i < 400; i++) begin
      if (i < 40 || $urandom_range(0, 4) != 0)
        p_send({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom});
      else p_idle();
    end
    repeat (20) p_idle();
    p_done = 1'b1;
  end

  // ---- iterative traffic ---------------------------------------------------
  task automatic i_send(input logic [127:0] k, input logic [63:0] x);
    #1;
    i_in_valid = 1'b1; i_pt = x;
    while (!i_in_ready) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    iq.push_back('{$time, kasumi(k, x)});
    #1 i_in_valid = 1'b0;
  endtask

  task automatic i_load(input logic [127:0] k);
    #1;
    i_key_load = 1'b1; i_key = k;
    @(posedge clk);
    #1 i_key_load = 1'b0;
  endtask

  initial begin
    logic [127:0] k2;
    wait (rst_n);
    @(posedge clk);
    i_load(TV_KEY);
    i_send(TV_KEY, TV_PT);
    for (int i = 0; i < 8; i++) i_send(TV_KEY, {$urandom, $urandom});
    repeat (20) @(posedge clk);
    k2 = {$urandom, $urandom, $urandom, $urandom};
    i_load(k2);
    for (int i = 0; i < 8; i++) begin
      repeat ($urandom_range(0, 4)) @(posedge clk);
      i_send(k2, {$urandom, $urandom});
    end
    repeat (20) @(posedge clk);
    i_done = 1'b1;
  end

  initial begin
    rst_n = 1'b0;
    p_in_valid = 1'b0; p_pt = '0; p_key = '0;
    i_key_load = 1'b0; i_key = '0; i_in_valid = 1'b0; i_pt = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (p_done && i_done);
    @(posedge clk);
    checks++;
    if (pq.size() != 0 || iq.size() != 0)
      fail($sformatf("results missing: pipelined %0d, iterative %0d", pq.size(), iq.size()));
    checks++; if (n_full == 0)     fail("pipeline never held 16 blocks");
    checks++; if (n_bubble == 0)   fail("no pipeline bubble");
    checks++; if (n_keychg == 0)   fail("no per-block key change");
    checks++; if (n_feedback == 0) fail("no iterative feedback pass");
    checks++; if (n_stall == 0)    fail("no iterative input stall");
    checks++; if (n_handover == 0) fail("no back-to-back iterative hand-over");
    checks++; if (n_reload < 2)    fail("no iterative key reload");
    $display("pipelined: %0d blocks, full %0d cycles, %0d bubbles, %0d key changes",
             p_outs, n_full, n_bubble, n_keychg);
    $display("iterative: %0d blocks, %0d feedback passes, %0d stall cycles, %0d hand-overs, %0d key loads",
             i_outs, n_feedback, n_stall, n_handover, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
