// tb_kasumi_fi_dp: streams a new random pair of (input, KI) values into both
// ports every cycle and checks that each port gives FI(input, KI) exactly one
// cycle later, for 3000 cycles. Also checks an all-zero case worked out by
// hand from the S-box tables: FI(0, 0) = {S7[S7[0]^S9[0][6:0]] ^ r3, r3}.
module tb_kasumi_fi_dp;
  import kasumi_ref_pkg::*;
  import kasumi_pkg::S7_TABLE;
  import kasumi_pkg::S9_TABLE;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] in_a, ki_a, in_b, ki_b, out_a, out_b;
  logic [15:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  kasumi_fi_dp dut (.clk, .in_a, .ki_a, .in_b, .ki_b, .out_a, .out_b);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FI(0,0) by hand: R1 = S9[0]; L2 = R1; R2 = S7[0] ^ R1[6:0];
  // R3 = S9[L2] ^ R2; L4 = S7[R2] ^ R3[6:0]
  function automatic logic [15:0] fi_zero();
    logic [8:0] r1, r3;
    logic [6:0] r2;
    r1 = S9_TABLE[0];
    r2 = S7_TABLE[0] ^ r1[6:0];
    r3 = S9_TABLE[r1] ^ {2'b0, r2};
    return {S7_TABLE[r2] ^ r3[6:0], r3};
  endfunction

  initial begin
    @(posedge clk);
    #1;
    in_a = 16'h0; ki_a = 16'h0; in_b = 16'h0; ki_b = 16'h0;
    exp_a = fi_zero(); exp_b = fi_zero();
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      #1;
      checks++;
      if (out_a !== exp_a || out_b !== exp_b) begin
        failures++;
        $display("FAIL cycle %0d got %h/%h exp %h/%h", i, out_a, out_b, exp_a, exp_b);
      end
      in_a = 16'($urandom); ki_a = 16'($urandom);
      in_b = 16'($urandom); ki_b = 16'($urandom);
      exp_a = fi(in_a, ki_a);
      exp_b = fi(in_b, ki_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
