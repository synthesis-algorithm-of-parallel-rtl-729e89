// input_hash: the input hash function F_i in front of one index generation
// unit.
//
// Purely combinational. It splits an N-bit input vector into a P-bit main
// memory address (hash) and the N-P bits the AUX memory check compares
// (rest). Hash bit j is the input bit at pivot position hash_pivot(IGU, j)
// XOR the parity of the non-pivot bits chosen by hash_xmask(SEED, IGU, j);
// rest holds the non-pivot bits in ascending bit order. Since each hash bit owns
// one pivot bit, (hash, rest) determines the input, so two different
// vectors that map to the same hash value always differ in rest.
//
// Building F from wires and XOR gates follows the design description; the
// particular pivot rotation and masks (see pigu_pkg) are this design's own.
// Setting every mask to zero yields a pure wire hash (P of the N inputs).
//
// Ports: vec (input vector), hash (P bits), rest (N-P bits). No clock.
// Parameters: IGU picks the function within a set, SEED picks the set.
module input_hash
  import pigu_pkg::*;
#(
  parameter int unsigned N   = N_DEFAULT,
  parameter int unsigned P   = P_DEFAULT,
  parameter int unsigned IGU = 0,          // which hash function of the set
  parameter int unsigned SEED = 0          // which set of hash functions
) (
  input  logic [N-1:0]   vec,
  output logic [P-1:0]   hash,
  output logic [N-P-1:0] rest
);

  if (N > MAX_N || P >= N || P == 0) begin : g_bad_size
    $error("input_hash: need 0 < P < N <= %0d", MAX_N);
  end

  localparam logic [MAX_N-1:0] PIVOTS = hash_pivot_set(IGU, N, P);

  always_comb begin
    for (int unsigned j = 0; j < P; j++) begin
      logic [N-1:0] m;
      m       = N'(hash_xmask(SEED, IGU, j) & ~PIVOTS);
      hash[j] = vec[hash_pivot(IGU, j, N)] ^ (^(vec & m));
    end
  end

  always_comb begin
    int unsigned k;
    k    = 0;
    rest = '0;
    for (int unsigned b = 0; b < N; b++) begin
      if (!PIVOTS[b]) begin
        rest[k] = vec[b];
        k++;
      end
    end
  end

endmodule
