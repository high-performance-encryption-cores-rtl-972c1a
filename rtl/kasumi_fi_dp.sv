// kasumi_fi_dp: dual-port FI block - two KASUMI FI functions in one clock cycle.
//
// FI is a 16-bit, four-round Feistel function over a 9-bit half (upper bits)
// and a 7-bit half (lower bits), keyed by KI = KI1 (7 MSBs) || KI2 (9 LSBs):
//   L1 = R0                    R1 = S9[L0] xor ZE(R0)
//   L2 = R1 xor KI2            R2 = S7[L1] xor TR(R1) xor KI1
//   L3 = R2                    R3 = S9[L2] xor ZE(R2)
//   L4 = S7[L3] xor TR(R3)     R4 = R3          result = L4 || R4
// (ZE zero-extends 7 to 9 bits, TR keeps the 7 LSBs.) S9[L0] and S7[R0] only
// depend on the input, S9[L2] and S7[R2] only on the first pair's results, so
// FI needs two levels of S-box lookups.
//
// This block computes FI for two independent inputs, A and B, with one
// dual-port S9 and one dual-port S7 per level instead of two of each. The
// upper (first level) S-boxes read at the falling edge in the middle of the
// cycle, the lower ones at the rising edge that ends it; the 7-bit half and
// the key bits needed by the second level are captured at the same falling
// edge, and R2 at the rising edge, so the results are valid for the whole
// following cycle.
//
// Timing: in_a/in_b/ki_a/ki_b must be valid until the falling edge of cycle n;
// out_a/out_b hold FI(in, ki) throughout cycle n+1 (one cycle latency, one
// new pair of inputs per cycle).
// Following the document: the sharing of dual-port S-boxes between two FI
// functions and the falling/rising edge split. The negative-edge capture of
// the 7-bit half and the key, and the rising-edge capture of R2, are this
// design's choices to keep every path within one clock phase.
module kasumi_fi_dp (
  input  logic        clk,
  input  logic [15:0] in_a,
  input  logic [15:0] ki_a,
  input  logic [15:0] in_b,
  input  logic [15:0] ki_b,
  output logic [15:0] out_a,
  output logic [15:0] out_b
);

  // ---- upper level: S9[L0], S7[R0], read at the falling edge -------------
  logic [8:0] s9u_a, s9u_b;
  logic [6:0] s7u_a, s7u_b;

  kasumi_s9_dp #(.NEG_EDGE(1'b1)) u_s9_up (
    .clk, .addr_a(in_a[15:7]), .addr_b(in_b[15:7]), .data_a(s9u_a), .data_b(s9u_b)
  );
  kasumi_s7_dp #(.NEG_EDGE(1'b1)) u_s7_up (
    .clk, .addr_a(in_a[6:0]), .addr_b(in_b[6:0]), .data_a(s7u_a), .data_b(s7u_b)
  );

  logic [6:0]  r0_a_n, r0_b_n;
  logic [15:0] ki_a_n, ki_b_n;

  always_ff @(negedge clk) begin
    r0_a_n <= in_a[6:0];
    r0_b_n <= in_b[6:0];
    ki_a_n <= ki_a;
    ki_b_n <= ki_b;
  end

  // ---- between the levels (second half of the cycle) ---------------------
  logic [8:0] r1_a, r1_b, l2_a, l2_b;
  logic [6:0] r2_a, r2_b;

  always_comb begin
    r1_a = s9u_a ^ {2'b00, r0_a_n};
    r1_b = s9u_b ^ {2'b00, r0_b_n};
    l2_a = r1_a ^ ki_a_n[8:0];
    l2_b = r1_b ^ ki_b_n[8:0];
    r2_a = s7u_a ^ r1_a[6:0] ^ ki_a_n[15:9];
    r2_b = s7u_b ^ r1_b[6:0] ^ ki_b_n[15:9];
  end

  // ---- lower level: S9[L2], S7[R2], read at the rising edge --------------
  logic [8:0] s9l_a, s9l_b;
  logic [6:0] s7l_a, s7l_b;

  kasumi_s9_dp #(.NEG_EDGE(1'b0)) u_s9_lo (
    .clk, .addr_a(l2_a), .addr_b(l2_b), .data_a(s9l_a), .data_b(s9l_b)
  );
  kasumi_s7_dp #(.NEG_EDGE(1'b0)) u_s7_lo (
    .clk, .addr_a(r2_a), .addr_b(r2_b), .data_a(s7l_a), .data_b(s7l_b)
  );

  logic [6:0] r2_a_p, r2_b_p;

  always_ff @(posedge clk) begin
    r2_a_p <= r2_a;
    r2_b_p <= r2_b;
  end

  // ---- results (valid for the whole next cycle) --------------------------
  logic [8:0] r3_a, r3_b;

  always_comb begin
    r3_a  = s9l_a ^ {2'b00, r2_a_p};
    r3_b  = s9l_b ^ {2'b00, r2_b_p};
    out_a = {s7l_a ^ r3_a[6:0], r3_a};
    out_b = {s7l_b ^ r3_b[6:0], r3_b};
  end

endmodule
