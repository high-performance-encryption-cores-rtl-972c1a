// tb_kasumi_fl: checks the combinational FL function against the reference
// model for 2000 random inputs and keys, plus two hand-worked cases.
module tb_kasumi_fl;
  import kasumi_ref_pkg::*;

  logic [31:0] din, dout;
  logic [15:0] kl1, kl2;
  int checks = 0, failures = 0;

  kasumi_fl dut (.din, .kl1, .kl2, .dout);

  task automatic check(input logic [31:0] exp);
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL fl din=%h kl=%h/%h got %h exp %h", din, kl1, kl2, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: L=8000, R=0000, KL1=FFFF, KL2=0000
    // R' = 0 ^ rol(8000,1) = 0001 ; L' = 8000 ^ rol(0001,1) = 8002
    din = 32'h8000_0000; kl1 = 16'hFFFF; kl2 = 16'h0000; check(32'h8002_0001);
    // all zero key and L: R'=R, L' = rol(R,1)
    din = 32'h0000_4001; kl1 = 16'h0000; kl2 = 16'h0000; check(32'h8002_4001);
    for (int i = 0; i < 2000; i++) begin
      din = $urandom; kl1 = 16'($urandom); kl2 = 16'($urandom);
      check(fl(din, kl1, kl2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
