// tb_kasumi_iterative: checks the iterative core against the reference model.
//   1. load the specification's key, encrypt its test vector: the ciphertext
//      appears with out_valid exactly 16 cycles after the block was taken;
//   2. ten blocks offered back to back with in_valid held high: in_ready must
//      drop for 16 cycles after each block and a new block is taken in the
//      same cycle the previous result appears (64 bits per 16 cycles);
//   3. random gaps, then a key reload and more blocks under the new key.
module tb_kasumi_iterative;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, key_load, in_valid, in_ready, out_valid;
  logic [127:0] key;
  logic [63:0]  pt, ct;
  int checks = 0, failures = 0;
  int cycle = 0;

  kasumi_iterative dut (.clk, .rst_n, .key_load, .key, .in_valid, .in_ready, .pt,
                        .out_valid, .ct);

  // t: time of the rising edge that takes the block (end of its first cycle)
  typedef struct { longint t; logic [63:0] exp; } pend_t;
  pend_t q [$];
  int outs = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency = rising edges from the one that takes a block to the one that
  // registers its result, counting both: 16 for both cores
  always @(posedge clk) begin
    longint tnow;
    tnow = $time;
    #2;
    cycle++;
    if (rst_n && out_valid) begin
      pend_t p;
      checks++;
      outs++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", ct);
      end else begin
        p = q.pop_front();
        if (ct !== p.exp || (tnow - p.t) / 10 + 1 != 16) begin
          failures++;
          $display("FAIL ct %h exp %h latency %0d", ct, p.exp, (tnow - p.t) / 10 + 1);
        end
      end
    end
  end

  // offer a block until it is taken; returns the cycles spent waiting
  task automatic send(input logic [127:0] k, input logic [63:0] p, output int waited);
    waited = 0;
    #1;
    in_valid = 1'b1; pt = p;
    while (!in_ready) begin
      @(posedge clk);
      #1;
      waited++;
    end
    @(posedge clk);
    q.push_back('{$time, kasumi(k, p)});
    #1 in_valid = 1'b0;
  endtask

  task automatic load(input logic [127:0] k);
    #1;
    key_load = 1'b1; key = k;
    @(posedge clk);
    #1 key_load = 1'b0;
  endtask

  initial begin
    logic [127:0] k2;
    int w;
    rst_n = 1'b0; key_load = 1'b0; in_valid = 1'b0; pt = '0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    load(TV_KEY);
    send(TV_KEY, TV_PT, w);
    repeat (20) @(posedge clk);
    checks++;
    if (outs != 1) begin
      failures++;
      $display("FAIL test vector gave %0d outputs", outs);
    end
    // back to back: after the first, each block waits 15 cycles beyond the
    // cycle it is offered in (taken in the 16th), i.e. a block every 16 cycles
    send(TV_KEY, {$urandom, $urandom}, w);
    for (int i = 0; i < 9; i++) begin
      send(TV_KEY, {$urandom, $urandom}, w);
      checks++;
      if (w != 15) begin
        failures++;
        $display("FAIL back-to-back block %0d waited %0d cycles", i, w);
      end
    end
    repeat (20) @(posedge clk);
    k2 = {$urandom, $urandom, $urandom, $urandom};
    load(k2);
    for (int i = 0; i < 6; i++) begin
      repeat ($urandom_range(0, 5)) @(posedge clk);
      send(k2, {$urandom, $urandom}, w);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (q.size() != 0 || outs != 17) begin
      failures++;
      $display("FAIL %0d results missing, %0d outputs", q.size(), outs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
