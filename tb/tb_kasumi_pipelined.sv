// tb_kasumi_pipelined: checks the pipelined core against the reference model.
//   1. the specification's test vector, alone in an empty pipeline: the
//      ciphertext must appear exactly 16 cycles after the block was taken;
//   2. 600 cycles of random traffic, a new block with its own random key in
//      most cycles (random bubbles, and a run of 64 blocks back to back):
//      every result in order, 16 cycles after its block, and one ciphertext
//      per cycle during the back-to-back run.
module tb_kasumi_pipelined;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, in_valid, out_valid;
  logic [63:0]  pt, ct;
  logic [127:0] key;
  int checks = 0, failures = 0;
  int cycle = 0;

  kasumi_pipelined dut (.clk, .rst_n, .in_valid, .pt, .key, .out_valid, .ct);

  // t: time of the rising edge that takes the block (end of its first cycle)
  typedef struct { longint t; logic [63:0] exp; } pend_t;
  pend_t q [$];
  int max_run = 0, cur_run = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker, just after each rising edge
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
      cur_run++;
      if (cur_run > max_run) max_run = cur_run;
    end else cur_run = 0;
  end

  task automatic send(input logic [127:0] k, input logic [63:0] p);
    #1;
    in_valid = 1'b1; key = k; pt = p;
    @(posedge clk);
    q.push_back('{$time, kasumi(k, p)});
  endtask

  task automatic idle();
    #1;
    in_valid = 1'b0; key = {4{$urandom}}; pt = {2{$urandom}};
    @(posedge clk);
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; pt = '0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    checks++;
    if (kasumi(TV_KEY, TV_PT) !== TV_CT) begin
      failures++;
      $display("FAIL reference model disagrees with the test vector");
    end
    send(TV_KEY, TV_PT);
    repeat (20) idle();
    for (int i = 0; i < 600; i++) begin
      if (i >= 200 && i < 264) send({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom});
      else if ($urandom_range(0, 3) == 0) idle();
      else send({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom});
    end
    repeat (20) idle();
    checks++;
    if (q.size() != 0 || max_run < 64) begin
      failures++;
      $display("FAIL %0d results missing, longest output run %0d", q.size(), max_run);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
