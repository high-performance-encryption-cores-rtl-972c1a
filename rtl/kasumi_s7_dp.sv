// kasumi_s7_dp: dual-port synchronous S7 substitution box (128 x 7 bit ROM).
//
// One ROM, two independent read ports A and B, each returning S7[addr] one
// clock edge after the address is presented. Sharing one table between two FI
// computations is what lets a dual-port FI block do the work of two FI
// functions with the S-box count of one. The read edge is a parameter: the
// "upper" S-boxes of a dual-port FI block read at the falling edge and the
// "lower" ones at the rising edge, so that both S-box levels of an FI
// function complete within one clock cycle. The table is the S7 table of the
// KASUMI standard (kasumi_pkg::S7_TABLE); it maps to a dual-port block RAM
// initialised as a ROM.
//
// Ports: clk; addr_a/addr_b (7 bit); data_a/data_b (7 bit), registered.
// Following the document: dual-port synchronous ROM, edge chosen per instance.
// No enable and no reset of the output registers are this design's choices.
module kasumi_s7_dp #(
  parameter bit NEG_EDGE = 1'b0  // 1: read at the falling clock edge
) (
  input  logic       clk,
  input  logic [6:0] addr_a,
  input  logic [6:0] addr_b,
  output logic [6:0] data_a,
  output logic [6:0] data_b
);

  import kasumi_pkg::*;

  if (NEG_EDGE) begin : g_neg
    always_ff @(negedge clk) begin
      data_a <= S7_TABLE[addr_a];
      data_b <= S7_TABLE[addr_b];
    end
  end else begin : g_pos
    always_ff @(posedge clk) begin
      data_a <= S7_TABLE[addr_a];
      data_b <= S7_TABLE[addr_b];
    end
  end

endmodule
