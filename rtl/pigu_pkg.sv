// pigu_pkg: sizes and input-hash configuration shared by the parallel index
// generation unit (PIGU) and its parts.
//
// Sizes. An index generation function maps an N-bit input vector to the index
// (1..k) of a registered vector, or to 0 when the vector is not registered.
// The index needs Q = ceil(log2(k+1)) bits. The defaults describe the largest
// evaluated case: 20-bit vectors, k up to 10000 (Q = 14), four IGUs (M = 4)
// whose main memories have P = 12 address bits. P = 12 is the value for which
// the memory-size formula 2^P * (N - P + Q) * M gives the 360k bits reported
// for four units at k = 10000.
//
// Input hash functions. Unit i hashes the input with a linear function built
// from wires and XOR gates: output bit j is input bit hash_pivot(i, j) XORed
// with the parity of the non-pivot input bits selected by hash_xmask(s, i, j).
// Because every output bit owns one pivot bit that no other output bit uses,
// the pair (hash, non-pivot bits) identifies the input uniquely, so the AUX
// memory only has to store the N - P non-pivot bits. The pivot positions are
// a rotation of 0..P-1 by PIVOT_STRIDE per unit and the XOR masks come from
// a pseudo-random formula of (seed, unit, bit); both are this design's own
// choices. A different seed gives a different set of hash functions, which
// is what the table builder changes when a set of vectors cannot be
// partitioned with the current one. The functions work on vectors of up to
// 32 bits.
package pigu_pkg;

  localparam int unsigned N_DEFAULT = 20;  // input vector width n
  localparam int unsigned P_DEFAULT = 12;  // main-memory address width p
  localparam int unsigned Q_DEFAULT = 14;  // index width q = ceil(log2(k+1))
  localparam int unsigned M_DEFAULT = 4;   // number of parallel IGUs m

  localparam int unsigned MAX_N        = 32;
  localparam int unsigned PIVOT_STRIDE = 5;

  // Input bit that output bit j of hash function igu passes through.
  function automatic int unsigned hash_pivot(int unsigned igu, int unsigned j,
                                             int unsigned n);
    return (j + igu * PIVOT_STRIDE) % n;
  endfunction

  // XOR mask of output bit j of hash function igu in hash set seed. Bits at
  // pivot positions are ignored by the hash unit. xorshift32 of a value
  // taken from (seed, igu, j).
  function automatic logic [MAX_N-1:0] hash_xmask(int unsigned seed, int unsigned igu,
                                                  int unsigned j);
    logic [31:0] s;
    s = 32'h9E37_79B9 * (((seed * 16) + igu) * 64 + j + 1);
    for (int r = 0; r < 3; r++) begin
      s = s ^ (s << 13);
      s = s ^ (s >> 17);
      s = s ^ (s << 5);
    end
    return s;
  endfunction

  // Set of pivot positions of hash function igu, as an N-bit mask.
  function automatic logic [MAX_N-1:0] hash_pivot_set(int unsigned igu, int unsigned n,
                                                      int unsigned p);
    logic [MAX_N-1:0] s;
    s = '0;
    for (int unsigned j = 0; j < p; j++) s[hash_pivot(igu, j, n)] = 1'b1;
    return s;
  endfunction

endpackage
