// tb_kasumi_two_round: drives the four-stage two-round datapath as a pipeline.
// Every cycle a new random L||R block enters together with its own random
// odd- and even-round keys; each key field is presented in the stage that
// reads it (see kasumi_two_round), so consecutive blocks use different keys.
// Output must equal the reference two_rounds() exactly 4 cycles later.
module tb_kasumi_two_round;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 2000;

  logic [31:0] l_in, r_in, l_out, r_out;
  round_key_t  rk_odd, rk_even;
  ref_rk_t     ko_q [N + 8];
  ref_rk_t     ke_q [N + 8];
  logic [63:0] in_q [N + 8];
  int checks = 0, failures = 0;

  kasumi_two_round dut (.clk, .l_in, .r_in, .rk_odd, .rk_even, .l_out, .r_out);

  function automatic ref_rk_t rnd_rk();
    ref_rk_t k;
    k.kl1 = 16'($urandom); k.kl2 = 16'($urandom);
    k.ko1 = 16'($urandom); k.ko2 = 16'($urandom); k.ko3 = 16'($urandom);
    k.ki1 = 16'($urandom); k.ki2 = 16'($urandom); k.ki3 = 16'($urandom);
    return k;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N + 8; i++) begin
      ko_q[i] = rnd_rk(); ke_q[i] = rnd_rk();
      in_q[i] = {$urandom, $urandom};
    end
    @(posedge clk);
    for (int c = 0; c < N + 4; c++) begin
      #1;
      // block c is in stage 1, c-1 in stage 2, c-2 in stage 3, c-3 in stage 4
      {l_in, r_in} = in_q[c];
      rk_odd.kl1 = ko_q[c].kl1;  rk_odd.kl2 = ko_q[c].kl2;
      rk_odd.ko1 = ko_q[c].ko1;  rk_odd.ko2 = ko_q[c].ko2;
      rk_odd.ki1 = ko_q[c].ki1;  rk_odd.ki2 = ko_q[c].ki2;
      rk_odd.ko3 = (c >= 1) ? ko_q[c-1].ko3 : 16'h0;
      rk_odd.ki3 = (c >= 1) ? ko_q[c-1].ki3 : 16'h0;
      rk_even.ko1 = (c >= 1) ? ke_q[c-1].ko1 : 16'h0;
      rk_even.ki1 = (c >= 1) ? ke_q[c-1].ki1 : 16'h0;
      rk_even.ko2 = (c >= 2) ? ke_q[c-2].ko2 : 16'h0;
      rk_even.ki2 = (c >= 2) ? ke_q[c-2].ki2 : 16'h0;
      rk_even.ko3 = (c >= 2) ? ke_q[c-2].ko3 : 16'h0;
      rk_even.ki3 = (c >= 2) ? ke_q[c-2].ki3 : 16'h0;
      rk_even.kl1 = (c >= 3) ? ke_q[c-3].kl1 : 16'h0;
      rk_even.kl2 = (c >= 3) ? ke_q[c-3].kl2 : 16'h0;
      if (c >= 4) begin
        checks++;
        if ({l_out, r_out} !== two_rounds(in_q[c-4], ko_q[c-4], ke_q[c-4])) begin
          failures++;
          $display("FAIL block %0d got %h exp %h", c - 4, {l_out, r_out},
                   two_rounds(in_q[c-4], ko_q[c-4], ke_q[c-4]));
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
