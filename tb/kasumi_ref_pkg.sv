// kasumi_ref_pkg: plain, unpipelined software model of KASUMI for the
// testbenches. Each function follows the cipher standard directly (FI, FO,
// FL, the key schedule and the eight-round Feistel network) without any of
// the restructuring done in the RTL. Only the S-box contents are taken from
// kasumi_pkg; the testbenches check those tables separately against published
// values (permutation property, corner entries and the standard test vector).
package kasumi_ref_pkg;

  import kasumi_pkg::S7_TABLE;
  import kasumi_pkg::S9_TABLE;

  typedef struct {
    logic [15:0] kl1, kl2, ko1, ko2, ko3, ki1, ki2, ki3;
  } ref_rk_t;

  function automatic logic [15:0] rl(input logic [15:0] x, input int n);
    logic [15:0] y;
    y = x;
    for (int i = 0; i < n; i++) y = {y[14:0], y[15]};
    return y;
  endfunction

  function automatic logic [15:0] fi(input logic [15:0] in, input logic [15:0] ki);
    logic [8:0] l0, r1, l2, r3;
    logic [6:0] r0, l1, r2, l3, l4;
    l0 = in[15:7];  r0 = in[6:0];
    l1 = r0;        r1 = S9_TABLE[l0] ^ {2'b0, r0};
    l2 = r1 ^ ki[8:0];
    r2 = S7_TABLE[l1] ^ r1[6:0] ^ ki[15:9];
    l3 = r2;        r3 = S9_TABLE[l2] ^ {2'b0, r2};
    l4 = S7_TABLE[l3] ^ r3[6:0];
    return {l4, r3};
  endfunction

  function automatic logic [31:0] fo(input logic [31:0] in, input ref_rk_t k);
    logic [15:0] l, r, t;
    logic [15:0] ko [3];
    logic [15:0] ki [3];
    ko = '{k.ko1, k.ko2, k.ko3};
    ki = '{k.ki1, k.ki2, k.ki3};
    l = in[31:16]; r = in[15:0];
    for (int j = 0; j < 3; j++) begin
      t = fi(l ^ ko[j], ki[j]) ^ r;
      l = r;
      r = t;
    end
    return {l, r};
  endfunction

  function automatic logic [31:0] fl(input logic [31:0] in, input logic [15:0] kl1,
                                     input logic [15:0] kl2);
    logic [15:0] l, r;
    l = in[31:16]; r = in[15:0];
    r = r ^ rl(l & kl1, 1);
    l = l ^ rl(r | kl2, 1);
    return {l, r};
  endfunction

  // Round keys of round i (1..8) for a 128-bit key.
  function automatic ref_rk_t round_key(input logic [127:0] key, input int i);
    logic [15:0] kk [8];
    logic [15:0] kp [8];
    logic [15:0] c  [8];
    ref_rk_t rk;
    c = '{16'h0123, 16'h4567, 16'h89AB, 16'hCDEF, 16'hFEDC, 16'hBA98, 16'h7654, 16'h3210};
    for (int j = 0; j < 8; j++) begin
      kk[j] = key[127 - 16*j -: 16];
      kp[j] = kk[j] ^ c[j];
    end
    // standard subscripts are 1-based: K_{i+n} with i=1..8 -> kk[(i-1+n)%8]
    rk.kl1 = rl(kk[(i - 1) % 8], 1);
    rk.kl2 = kp[(i + 1) % 8];
    rk.ko1 = rl(kk[i % 8], 5);
    rk.ko2 = rl(kk[(i + 4) % 8], 8);
    rk.ko3 = rl(kk[(i + 5) % 8], 13);
    rk.ki1 = kp[(i + 3) % 8];
    rk.ki2 = kp[(i + 2) % 8];
    rk.ki3 = kp[(i + 6) % 8];
    return rk;
  endfunction

  function automatic logic [31:0] round_f(input logic [31:0] in, input ref_rk_t k,
                                          input bit odd);
    if (odd) return fo(fl(in, k.kl1, k.kl2), k);
    else     return fl(fo(in, k), k.kl1, k.kl2);
  endfunction

  // Two rounds (odd then even) on L||R with explicit round keys.
  function automatic logic [63:0] two_rounds(input logic [63:0] in, input ref_rk_t ko,
                                             input ref_rk_t ke);
    logic [31:0] l, r, t;
    l = in[63:32]; r = in[31:0];
    t = r ^ round_f(l, ko, 1'b1); r = l; l = t;
    t = r ^ round_f(l, ke, 1'b0); r = l; l = t;
    return {l, r};
  endfunction

  function automatic logic [63:0] kasumi(input logic [127:0] key, input logic [63:0] pt);
    logic [31:0] l, r, t;
    l = pt[63:32]; r = pt[31:0];
    for (int i = 1; i <= 8; i++) begin
      t = r ^ round_f(l, round_key(key, i), (i % 2) == 1);
      r = l;
      l = t;
    end
    return {l, r};
  endfunction

  // Test set 1 of the KASUMI specification's test data.
  localparam logic [127:0] TV_KEY = 128'h2BD6459F82C5B300952C49104881FF48;
  localparam logic [63:0]  TV_PT  = 64'hEA024714AD5C4D84;
  localparam logic [63:0]  TV_CT  = 64'hDF1F9B251C0BF45F;

endpackage
