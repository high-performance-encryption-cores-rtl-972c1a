// kasumi_fl: the KASUMI FL function (32-bit, combinational).
//
// The input splits into halves L (bits 31:16) and R (bits 15:0); with the
// round key KL = KL1 || KL2
//   R' = R xor ((L and KL1) <<< 1)
//   L' = L xor ((R' or KL2) <<< 1)
// and the output is L' || R'. Only AND, OR, XOR and 1-bit rotations: it adds
// a few gate levels to the stage that holds it. Function as in the cipher
// standard, which the document describes.
module kasumi_fl (
  input  logic [31:0] din,
  input  logic [15:0] kl1,
  input  logic [15:0] kl2,
  output logic [31:0] dout
);

  import kasumi_pkg::*;

  word16_t l, r, l_o, r_o;

  always_comb begin
    l    = din[31:16];
    r    = din[15:0];
    r_o  = r ^ rol16(l & kl1, 1);
    l_o  = l ^ rol16(r_o | kl2, 1);
    dout = {l_o, r_o};
  end

endmodule
