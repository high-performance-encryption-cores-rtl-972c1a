// tb_kasumi_ksched_iter: loads a random key, runs four 16-cycle blocks (two
// back to back, then a gap, then one more, then a reload with a new key) and
// checks, in every cycle of a block, the round-key fields the datapath reads
// then: in cycles 4p+1..4p+2 all of round 2p+1 plus KO1/KI1 of round 2p+2; in
// cycles 4p+3..4p+4 the rest of round 2p+2. Also checks that the keys return
// to round 1 after each block (the registers rotate exactly eight times).
module tb_kasumi_ksched_iter;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, load, run;
  logic [127:0] key;
  round_key_t   rk_odd, rk_even;
  int checks = 0, failures = 0;

  kasumi_ksched_iter dut (.clk, .rst_n, .load, .key, .run, .rk_odd, .rk_even);

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic run_block(input logic [127:0] k);
    ref_rk_t o, e;
    for (int c = 0; c < 16; c++) begin
      #1;
      run = 1'b1;
      o = round_key(k, 2*(c/4) + 1);
      e = round_key(k, 2*(c/4) + 2);
      #1;
      if (c % 4 < 2) begin
        chk(rk_odd.kl1, o.kl1, "kl1"); chk(rk_odd.kl2, o.kl2, "kl2");
        chk(rk_odd.ko1, o.ko1, "ko1"); chk(rk_odd.ko2, o.ko2, "ko2");
        chk(rk_odd.ko3, o.ko3, "ko3"); chk(rk_odd.ki1, o.ki1, "ki1");
        chk(rk_odd.ki2, o.ki2, "ki2"); chk(rk_odd.ki3, o.ki3, "ki3");
        chk(rk_even.ko1, e.ko1, "even ko1"); chk(rk_even.ki1, e.ki1, "even ki1");
      end else begin
        chk(rk_even.kl1, e.kl1, "even kl1"); chk(rk_even.kl2, e.kl2, "even kl2");
        chk(rk_even.ko2, e.ko2, "even ko2"); chk(rk_even.ko3, e.ko3, "even ko3");
        chk(rk_even.ki2, e.ki2, "even ki2"); chk(rk_even.ki3, e.ki3, "even ki3");
      end
      @(posedge clk);
    end
  endtask

  task automatic load_key(input logic [127:0] k);
    #1;
    run = 1'b0; load = 1'b1; key = k;
    @(posedge clk);
    #1;
    load = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k1, k2;
    k1 = {$urandom, $urandom, $urandom, $urandom};
    k2 = TV_KEY;
    rst_n = 1'b0; load = 1'b0; run = 1'b0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    load_key(k1);
    @(posedge clk);
    run_block(k1);
    run_block(k1);                // back to back
    #1 run = 1'b0;
    repeat (3) @(posedge clk);    // idle gap
    run_block(k1);
    load_key(k2);                 // reload
    run_block(k2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
