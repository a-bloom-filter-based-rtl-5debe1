// bf_hash: the k = 2 hash functions of the Bloom filter.
//
// Both are Fibonacci (multiplicative) hashes: the 32-bit key is multiplied by
// floor(2^32 / golden ratio) = 0x9E3779B9 modulo 2^32 and the top IDX_W bits
// of the product are the bit index (IDX_W = 16 for a 65536-bit array).
// h1 hashes the IPv4 address itself; h2 hashes a fixed permutation of its
// bits. The design calls for Fibonacci hashing and for h2 to work on a fixed
// permutation; which permutation is this design's choice: the bit order of
// the address is reversed (bit i goes to bit 31-i).
// Purely combinational: the indices are valid in the same cycle as `ip`.
module bf_hash #(
  parameter int unsigned IDX_W = 16
) (
  input  logic [31:0]      ip,
  output logic [IDX_W-1:0] h1,
  output logic [IDX_W-1:0] h2
);
  import bi_pkg::*;

  logic [31:0] ip_perm;
  logic [31:0] prod1, prod2;

  always_comb begin
    for (int i = 0; i < 32; i++) ip_perm[i] = ip[31-i];
    prod1 = ip * FIB_MULT;
    prod2 = ip_perm * FIB_MULT;
    h1 = prod1[31 -: IDX_W];
    h2 = prod2[31 -: IDX_W];
  end
endmodule
