// tb_kasumi_sync_reg: checks the falling/rising edge register pair. D is set
// early in each cycle and overwritten with a decoy after the falling edge;
// Q must show, for the whole next cycle, the value D had at the falling edge.
module tb_kasumi_sync_reg;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] d, q, exp_q, prev_q;
  int checks = 0, failures = 0;

  kasumi_sync_reg #(.WIDTH(16)) dut (.clk, .d, .q);

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 16'h0;
    @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      #1;                       // just after a rising edge
      if (i > 0) begin
        checks++;
        if (q !== exp_q) begin
          failures++;
          $display("FAIL cycle %0d q=%h exp %h", i, q, exp_q);
        end
      end
      prev_q = q;
      exp_q  = 16'($urandom);
      d = exp_q;
      @(negedge clk);
      #1;
      if (i > 0) begin          // Q must not move at the falling edge
        checks++;
        if (q !== prev_q) begin
          failures++;
          $display("FAIL cycle %0d q moved at falling edge", i);
        end
      end
      d = ~exp_q;               // decoy after the falling edge
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
