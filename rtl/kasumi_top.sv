// kasumi_top: the two KASUMI encryption cores side by side.
//
// KASUMI is the 64-bit block cipher (128-bit key, eight Feistel rounds) at the
// heart of the UMTS f8/f9 confidentiality and integrity functions and of
// GSM A5/3 and GPRS GEA3. Two implementations of it are offered:
//   p_* : kasumi_pipelined - throughput of one block per cycle, 16-cycle
//         latency, 48 S-box ROMs; a key per block.
//   i_* : kasumi_iterative - one two-round datapath reused four times,
//         one block per 16 cycles, 12 S-box ROMs; a loaded key.
// The two are independent; they share only the clock and reset. See the two
// cores for port timing.
module kasumi_top (
  input  logic        clk,
  input  logic        rst_n,
  // pipelined core
  input  logic        p_in_valid,
  input  logic [63:0] p_pt,
  input  logic [127:0] p_key,
  output logic        p_out_valid,
  output logic [63:0] p_ct,
  // iterative core
  input  logic        i_key_load,
  input  logic [127:0] i_key,
  input  logic        i_in_valid,
  output logic        i_in_ready,
  input  logic [63:0] i_pt,
  output logic        i_out_valid,
  output logic [63:0] i_ct
);

  kasumi_pipelined u_pipelined (
    .clk, .rst_n,
    .in_valid(p_in_valid), .pt(p_pt), .key(p_key),
    .out_valid(p_out_valid), .ct(p_ct)
  );

  kasumi_iterative u_iterative (
    .clk, .rst_n,
    .key_load(i_key_load), .key(i_key),
    .in_valid(i_in_valid), .in_ready(i_in_ready), .pt(i_pt),
    .out_valid(i_out_valid), .ct(i_ct)
  );

endmodule
