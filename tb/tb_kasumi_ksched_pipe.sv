// tb_kasumi_ksched_pipe: a new random key enters every cycle. For each PAIR
// (four instances, 0..3) every round-key field must belong to the key that
// is in the stage reading that field (odd round 2*PAIR+1, even round
// 2*PAIR+2, from the reference key schedule), and key_out must be the key
// that entered 4 cycles earlier.
module tb_kasumi_ksched_pipe;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 500;

  logic [127:0] key_in;
  logic [127:0] key_out [4];
  round_key_t   rk_o [4];
  round_key_t   rk_e [4];
  logic [127:0] kq [N];
  int checks = 0, failures = 0;

  for (genvar p = 0; p < 4; p++) begin : g_p
    kasumi_ksched_pipe #(.PAIR(p)) dut (
      .clk, .key_in, .key_out(key_out[p]), .rk_odd(rk_o[p]), .rk_even(rk_e[p])
    );
  end

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_rk_t o1, o2, e2, e3, e4;
    for (int i = 0; i < N; i++) kq[i] = {$urandom, $urandom, $urandom, $urandom};
    @(posedge clk);
    for (int c = 0; c < N; c++) begin
      #1;
      key_in = kq[c];
      #1;
      if (c >= 4) begin
        for (int p = 0; p < 4; p++) begin
          o1 = round_key(kq[c],   2*p + 1);
          o2 = round_key(kq[c-1], 2*p + 1);
          e2 = round_key(kq[c-1], 2*p + 2);
          e3 = round_key(kq[c-2], 2*p + 2);
          e4 = round_key(kq[c-3], 2*p + 2);
          chk(rk_o[p].kl1, o1.kl1, "odd kl1"); chk(rk_o[p].kl2, o1.kl2, "odd kl2");
          chk(rk_o[p].ko1, o1.ko1, "odd ko1"); chk(rk_o[p].ko2, o1.ko2, "odd ko2");
          chk(rk_o[p].ki1, o1.ki1, "odd ki1"); chk(rk_o[p].ki2, o1.ki2, "odd ki2");
          chk(rk_o[p].ko3, o2.ko3, "odd ko3"); chk(rk_o[p].ki3, o2.ki3, "odd ki3");
          chk(rk_e[p].ko1, e2.ko1, "even ko1"); chk(rk_e[p].ki1, e2.ki1, "even ki1");
          chk(rk_e[p].ko2, e3.ko2, "even ko2"); chk(rk_e[p].ki2, e3.ki2, "even ki2");
          chk(rk_e[p].ko3, e3.ko3, "even ko3"); chk(rk_e[p].ki3, e3.ki3, "even ki3");
          chk(rk_e[p].kl1, e4.kl1, "even kl1"); chk(rk_e[p].kl2, e4.kl2, "even kl2");
          checks++;
          if (key_out[p] !== kq[c-4]) begin
            failures++;
            $display("FAIL key_out pair %0d", p);
          end
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
