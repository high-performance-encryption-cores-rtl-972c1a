// tb_kasumi_s7_dp: checks the dual-port S7 ROM in both edge variants.
// Both ports of a falling-edge and a rising-edge instance sweep all 128
// addresses (port B in reverse order). Checked: each read returns the table
// entry, the table is a permutation (every output value seen once), the
// corner entries match the published table (S7[0] = 54,
// S7[128-1] = 3), and each instance updates only on its own edge.
module tb_kasumi_s7_dp;
  import kasumi_pkg::S7_TABLE;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7-1:0] addr_a, addr_b;
  logic [7-1:0] na, nb, pa, pb;
  logic [7-1:0] na_hold, pa_hold;
  bit   seen [128];
  int checks = 0, failures = 0;

  kasumi_s7_dp #(.NEG_EDGE(1'b1)) dut_n (.clk, .addr_a, .addr_b, .data_a(na), .data_b(nb));
  kasumi_s7_dp #(.NEG_EDGE(1'b0)) dut_p (.clk, .addr_a, .addr_b, .data_a(pa), .data_b(pb));

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
    chk(S7_TABLE[0] == 7'd54, "corner entry 0");
    chk(S7_TABLE[128-1] == 7'd3, "corner entry last");
    @(posedge clk);
    for (int i = 0; i < 128; i++) begin
      #1;
      addr_a = 7'(i);
      addr_b = 7'(128 - 1 - i);
      pa_hold = pa;
      @(negedge clk);
      #1;
      chk(na == S7_TABLE[i] && nb == S7_TABLE[128-1-i], $sformatf("neg read %0d", i));
      chk(pa == pa_hold, $sformatf("pos port moved at falling edge %0d", i));
      seen[na] = 1'b1;
      na_hold = na;
      @(posedge clk);
      #1;
      chk(pa == S7_TABLE[i] && pb == S7_TABLE[128-1-i], $sformatf("pos read %0d", i));
      // change the address after the rising edge: the falling-edge port
      // must keep its value until the next falling edge
      chk(na == na_hold, $sformatf("neg port moved at rising edge %0d", i));
    end
    for (int v = 0; v < 128; v++) chk(seen[v], $sformatf("value %0d never produced", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
