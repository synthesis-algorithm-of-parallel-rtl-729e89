// cfp_pkg: testbench model of table construction for the parallel IGU.
//
// hash_of / rest_of evaluate the input hash functions of pigu_pkg from their
// definition (pivot bit XOR parity of masked non-pivot bits), independently
// of the input_hash RTL.
//
// cfp_partition is conflict-free partitioning: a bipartite graph joins every
// registered vector to the M hash values (unit, F_unit(vector)) it could
// occupy; a maximum matching that covers all vectors puts each vector in the
// unit of its matched edge, and no two vectors of one unit share a hash
// value. The matching is grown one vector at a time by a breadth-first
// search for an augmenting path (Kuhn's method), which reaches a maximum
// matching. The hash table is passed flat: h[v*m + u] is the hash value of
// vector v under unit u, in 0..slots-1.
package cfp_pkg;
  import pigu_pkg::*;

  function automatic int unsigned hash_of(logic [MAX_N-1:0] v, int unsigned igu,
                                          int unsigned n, int unsigned p,
                                          int unsigned seed = 0);
    logic [MAX_N-1:0] piv;
    logic [MAX_N-1:0] nmask;
    int unsigned      h;
    piv   = hash_pivot_set(igu, n, p);
    nmask = (MAX_N'(1) << n) - 1;
    h     = 0;
    for (int unsigned j = 0; j < p; j++) begin
      logic b;
      b = v[hash_pivot(igu, j, n)] ^ (^(v & hash_xmask(seed, igu, j) & ~piv & nmask));
      if (b) h = h | (32'd1 << j);
    end
    return h;
  endfunction

  function automatic logic [MAX_N-1:0] rest_of(logic [MAX_N-1:0] v, int unsigned igu,
                                               int unsigned n, int unsigned p);
    logic [MAX_N-1:0] piv;
    logic [MAX_N-1:0] r;
    int unsigned      k;
    piv = hash_pivot_set(igu, n, p);
    r   = '0;
    k   = 0;
    for (int unsigned b = 0; b < n; b++) begin
      if (!piv[b]) begin
        r[k] = v[b];
        k++;
      end
    end
    return r;
  endfunction

  // Returns the number of vectors matched; unit[v] is the unit of vector v
  // (or -1). The partition exists iff the result equals k.
  function automatic int cfp_partition(input int unsigned h[], input int k,
                                       input int m, input int slots,
                                       output int unit[]);
    int owner[];      // vector in slot u*slots+value, or -1
    int match_of[];   // slot of vector, or -1
    int slot_prev[];  // BFS: vector that reached this slot
    int slot_seen[];
    int vec_seen[];
    int queue[];
    int matched;
    owner     = new[m * slots];
    slot_prev = new[m * slots];
    slot_seen = new[m * slots];
    match_of  = new[k];
    vec_seen  = new[k];
    queue     = new[k];
    unit      = new[k];
    foreach (owner[s]) begin
      owner[s]     = -1;
      slot_seen[s] = -1;
    end
    foreach (match_of[v]) begin
      match_of[v] = -1;
      vec_seen[v] = -1;
    end
    matched = 0;
    for (int v = 0; v < k; v++) begin
      int  qh, qt;
      int  free_slot;
      qh = 0;
      qt = 0;
      free_slot = -1;
      queue[qt++] = v;
      vec_seen[v] = v;
      while (qh < qt && free_slot < 0) begin
        int x;
        x = queue[qh++];
        for (int u = 0; u < m && free_slot < 0; u++) begin
          int s;
          s = u * slots + int'(h[x * m + u]);
          if (slot_seen[s] != v) begin
            slot_seen[s] = v;
            slot_prev[s] = x;
            if (owner[s] < 0) free_slot = s;
            else if (vec_seen[owner[s]] != v) begin
              vec_seen[owner[s]] = v;
              queue[qt++] = owner[s];
            end
          end
        end
      end
      if (free_slot >= 0) begin
        int s;
        s = free_slot;
        while (s >= 0) begin
          int x, old;
          x           = slot_prev[s];
          old         = match_of[x];
          owner[s]    = x;
          match_of[x] = s;
          s           = old;
        end
        matched++;
      end
    end
    foreach (unit[v]) unit[v] = (match_of[v] < 0) ? -1 : match_of[v] / slots;
    return matched;
  endfunction

endpackage
