// hyco_bloom: Bloom filter of destination sets that could not be routed.
//
// A bit vector of M bits and K hash functions of the H3 family: hash h of a
// KEYW-bit key is the XOR of a fixed log2(M)-bit constant for each set key
// bit (constants from hyco_pkg::hash_const). test_key is looked up
// combinationally: hit is 1 when all K addressed bits are set, i.e. the set was
// seen before (with the usual small false-positive rate, never a false
// negative). insert sets the K bits of ins_key at the next clock edge; clear
// empties the filter. fill counts inserts since the last clear and saturates.
// The published HyCo design gives the filter's role and the bit-vector/hash principle; M,
// K and the hash family are this design's choices.
module hyco_bloom import hyco_pkg::*; #(
  parameter int unsigned KEYW = 32,
  parameter int unsigned M    = 1024,
  parameter int unsigned K    = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic [KEYW-1:0] test_key,
  output logic            hit,
  input  logic            insert,
  input  logic [KEYW-1:0] ins_key,
  output logic [15:0]     fill
);
  localparam int unsigned LOGM = $clog2(M);

  logic [M-1:0] bits_q;
  logic [K-1:0][LOGM-1:0] t_idx, i_idx;

  function automatic logic [LOGM-1:0] hash(int unsigned h, logic [KEYW-1:0] key);
    logic [LOGM-1:0] acc;
    acc = '0;
    for (int unsigned b = 0; b < KEYW; b++)
      if (key[b]) acc ^= hash_const(h, b)[LOGM-1:0];
    return acc;
  endfunction

  always_comb begin
    hit = 1'b1;
    for (int unsigned h = 0; h < K; h++) begin
      t_idx[h] = hash(h, test_key);
      i_idx[h] = hash(h, ins_key);
      if (!bits_q[t_idx[h]]) hit = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bits_q <= '0;
      fill   <= '0;
    end else if (clear) begin
      bits_q <= '0;
      fill   <= '0;
    end else if (insert) begin
      for (int unsigned h = 0; h < K; h++) bits_q[i_idx[h]] <= 1'b1;
      if (fill != '1) fill <= fill + 1'b1;
    end
  end
endmodule
