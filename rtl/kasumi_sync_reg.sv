// kasumi_sync_reg: negative-edge register followed by a positive-edge register.
//
// Every data line that runs beside a dual-port FI block passes through one of
// these pairs, so that it arrives at the next stage in the same clock cycle as
// the FI results. The first flop captures D at the falling edge in the middle
// of the cycle (the same instant at which the FI block's upper S-boxes sample
// their addresses); the second flop re-times it to the rising edge that ends
// the cycle. Net effect: Q equals the D of the previous cycle, a one-cycle
// delay whose input only has to be valid until the middle of the cycle.
// The register pair follows the document; no reset (pure datapath storage) is
// this design's choice.
module kasumi_sync_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] d_neg;

  always_ff @(negedge clk) d_neg <= d;
  always_ff @(posedge clk) q     <= d_neg;

endmodule
