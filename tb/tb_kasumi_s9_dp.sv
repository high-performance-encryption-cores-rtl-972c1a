// tb_kasumi_s9_dp: checks the dual-port S9 ROM in both edge variants.
// Both ports of a falling-edge and a rising-edge instance sweep all 512
// addresses (port B in reverse order). Checked: each read returns the table
// entry, the table is a permutation (every output value seen once), the
// corner entries match the published table (S9[0] = 167,
// S9[512-1] = 461), and each instance updates only on its own edge.
module tb_kasumi_s9_dp;
  import kasumi_pkg::S9_TABLE;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [9-1:0] addr_a, addr_b;
  logic [9-1:0] na, nb, pa, pb;
  logic [9-1:0] na_hold, pa_hold;
  bit   seen [512];
  int checks = 0, failures = 0;

  kasumi_s9_dp #(.NEG_EDGE(1'b1)) dut_n (.clk, .addr_a, .addr_b, .data_a(na), .data_b(nb));
  kasumi_s9_dp #(.NEG_EDGE(1'b0)) dut_p (.clk, .addr_a, .addr_b, .data_a(pa), .data_b(pb));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(S9_TABLE[0] == 9'd167, "corner entry 0");
    chk(S9_TABLE[512-1] == 9'd461, "corner entry last");
    @(posedge clk);
    for (int i = 0; i < 512; i++) begin
      #1;
      addr_a = 9'(i);
      addr_b = 9'(512 - 1 - i);
      pa_hold = pa;
      @(negedge clk);
      #1;
      chk(na == S9_TABLE[i] && nb == S9_TABLE[512-1-i], $sformatf("neg read %0d", i));
      chk(pa == pa_hold, $sformatf("pos port moved at falling edge %0d", i));
      seen[na] = 1'b1;
      na_hold = na;
      @(posedge clk);
      #1;
      chk(pa == S9_TABLE[i] && pb == S9_TABLE[512-1-i], $sformatf("pos read %0d", i));
      // change the address after the rising edge: the falling-edge port
      // must keep its value until the next falling edge
      chk(na == na_hold, $sformatf("neg port moved at rising edge %0d", i));
    end
    for (int v = 0; v < 512; v++) chk(seen[v], $sformatf("value %0d never produced", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
