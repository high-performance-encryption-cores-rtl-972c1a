// kasumi_two_round: four-stage datapath for one odd KASUMI round followed by
// one even round.
//
// An odd round computes L1 = R0 xor FO(FL(L0)), R1 = L0; the even round
// computes L2 = R1 xor FL(FO(L1)) = L0 xor FL(FO(L1)), R2 = L1. FO is a
// three-round Feistel function of three FI calls. Written out, the first two
// FI calls of the odd round's FO are independent, and once the XOR between
// the two FO functions is split into 16-bit halves, the third FI of the odd
// FO can run beside the first FI of the even FO, and the last two FI calls of
// the even FO run side by side. The six FI calls therefore fall into three
// pairs, each handled by one dual-port FI block (kasumi_fi_dp):
//
//   stage 1  X = FL(L0, KL_o)
//            FIa1 = FI(X.hi ^ KO_o1, KI_o1)       FIa2 = FI(X.lo ^ KO_o2, KI_o2)
//   stage 2  r1 = FIa1 ^ X.lo   r2 = FIa2 ^ r1    L1.hi = R0.hi ^ r2
//            FIa3 = FI(r1 ^ KO_o3, KI_o3)         FIb1 = FI(L1.hi ^ KO_e1, KI_e1)
//   stage 3  r3 = FIa3 ^ r2     L1.lo = R0.lo ^ r3   s1 = FIb1 ^ L1.lo
//            FIb2 = FI(L1.lo ^ KO_e2, KI_e2)      FIb3 = FI(s1 ^ KO_e3, KI_e3)
//   stage 4  s2 = FIb2 ^ s1     s3 = FIb3 ^ s2
//            L2 = L0 ^ FL(s2 || s3, KL_e)    R2 = L1     -> output registers
//
// Values that run beside an FI block pass through a falling-edge/rising-edge
// register pair (kasumi_sync_reg) so they stay aligned with the FI results.
//
// Timing: l_in/r_in are taken in cycle n (valid until its falling edge);
// l_out/r_out hold L2/R2 in cycle n+4. A new block may enter every cycle.
// Round keys are read in the stage that uses them, so the two round-key
// inputs need only be valid then:
//   rk_odd  (all fields)                : stages 1-2 (kl*, ko1/2, ki1/2 in
//                                         stage 1; ko3, ki3 in stage 2)
//   rk_even.ko1, rk_even.ki1            : stage 2
//   rk_even.ko2/3, ki2/3, kl1/2         : stages 3-4 (kl* in stage 4)
// Following the document: the three dual-port FI blocks, the register pairs
// around them and the four-stage, two-round structure. What the fourth stage
// holds (the closing FL and the L0 XOR, registered at the output) is this
// design's choice.
module kasumi_two_round
  import kasumi_pkg::*;
(
  input  logic       clk,
  input  logic [31:0] l_in,
  input  logic [31:0] r_in,
  input  round_key_t  rk_odd,
  input  round_key_t  rk_even,
  output logic [31:0] l_out,
  output logic [31:0] r_out
);

  // ---- stage 1 ------------------------------------------------------------
  logic [31:0] x;
  logic [15:0] fia1, fia2;

  kasumi_fl u_fl_odd (.din(l_in), .kl1(rk_odd.kl1), .kl2(rk_odd.kl2), .dout(x));

  kasumi_fi_dp u_fi1 (
    .clk,
    .in_a(x[31:16] ^ rk_odd.ko1), .ki_a(rk_odd.ki1),
    .in_b(x[15:0]  ^ rk_odd.ko2), .ki_b(rk_odd.ki2),
    .out_a(fia1), .out_b(fia2)
  );

  logic [15:0] s1_xlo;
  logic [31:0] s1_l0, s1_r0;
  kasumi_sync_reg #(.WIDTH(16)) u_s1_xlo (.clk, .d(x[15:0]), .q(s1_xlo));
  kasumi_sync_reg #(.WIDTH(32)) u_s1_l0  (.clk, .d(l_in),    .q(s1_l0));
  kasumi_sync_reg #(.WIDTH(32)) u_s1_r0  (.clk, .d(r_in),    .q(s1_r0));

  // ---- stage 2 ------------------------------------------------------------
  logic [15:0] r1, r2, l1_hi;
  logic [15:0] fia3, fib1;

  always_comb begin
    r1    = fia1 ^ s1_xlo;
    r2    = fia2 ^ r1;
    l1_hi = s1_r0[31:16] ^ r2;
  end

  kasumi_fi_dp u_fi2 (
    .clk,
    .in_a(r1    ^ rk_odd.ko3),  .ki_a(rk_odd.ki3),
    .in_b(l1_hi ^ rk_even.ko1), .ki_b(rk_even.ki1),
    .out_a(fia3), .out_b(fib1)
  );

  logic [15:0] s2_r2, s2_l1hi, s2_r0lo;
  logic [31:0] s2_l0;
  kasumi_sync_reg #(.WIDTH(16)) u_s2_r2   (.clk, .d(r2),          .q(s2_r2));
  kasumi_sync_reg #(.WIDTH(16)) u_s2_l1hi (.clk, .d(l1_hi),       .q(s2_l1hi));
  kasumi_sync_reg #(.WIDTH(16)) u_s2_r0lo (.clk, .d(s1_r0[15:0]), .q(s2_r0lo));
  kasumi_sync_reg #(.WIDTH(32)) u_s2_l0   (.clk, .d(s1_l0),       .q(s2_l0));

  // ---- stage 3 ------------------------------------------------------------
  logic [15:0] r3, l1_lo, e1;
  logic [15:0] fib2, fib3;

  always_comb begin
    r3    = fia3 ^ s2_r2;
    l1_lo = s2_r0lo ^ r3;
    e1    = fib1 ^ l1_lo;
  end

  kasumi_fi_dp u_fi3 (
    .clk,
    .in_a(l1_lo ^ rk_even.ko2), .ki_a(rk_even.ki2),
    .in_b(e1    ^ rk_even.ko3), .ki_b(rk_even.ki3),
    .out_a(fib2), .out_b(fib3)
  );

  logic [31:0] s3_l1, s3_l0;
  logic [15:0] s3_e1;
  kasumi_sync_reg #(.WIDTH(32)) u_s3_l1 (.clk, .d({s2_l1hi, l1_lo}), .q(s3_l1));
  kasumi_sync_reg #(.WIDTH(16)) u_s3_e1 (.clk, .d(e1),               .q(s3_e1));
  kasumi_sync_reg #(.WIDTH(32)) u_s3_l0 (.clk, .d(s2_l0),            .q(s3_l0));

  // ---- stage 4 ------------------------------------------------------------
  logic [15:0] e2, e3;
  logic [31:0] y;

  always_comb begin
    e2 = fib2 ^ s3_e1;
    e3 = fib3 ^ e2;
  end

  kasumi_fl u_fl_even (.din({e2, e3}), .kl1(rk_even.kl1), .kl2(rk_even.kl2), .dout(y));

  kasumi_sync_reg #(.WIDTH(64)) u_s4_out (
    .clk, .d({s3_l0 ^ y, s3_l1}), .q({l_out, r_out})
  );

endmodule
