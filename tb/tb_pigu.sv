// tb_pigu: end-to-end test of the parallel index generation unit at its
// default size (20-bit vectors, four units of 2^12 entries, 14-bit index).
//
// Registers K = 10000 distinct random vectors (the largest registered-vector
// set of the evaluation) with indices 1..K. The conflict-free partition is
// computed by the matching model in cfp_pkg and checked to be complete and
// conflict-free, then the tables are written through the write port. Every
// registered vector is looked up and must return its index; random
// unregistered vectors must return 0. Each result must appear exactly two
// cycles after the lookup is accepted, and the start-up clear must take 2^P
// cycles. The test also removes and re-registers a vector, issues an
// explicit clear, and tries lookups while the unit is busy or writing.
// Mechanisms counted (each must occur): reset clear, explicit clear, a hit
// in every unit, a miss on empty main-memory words in all units, a miss
// rejected by the AUX check, a lookup held off by busy and by a write, an
// entry removal and an entry update. The matching model is also run on the
// seven-vector, two-function example partition and must cover all vectors.
module tb_pigu;
  import pigu_pkg::*;
  import cfp_pkg::*;

  localparam int unsigned N  = N_DEFAULT;
  localparam int unsigned P  = P_DEFAULT;
  localparam int unsigned Q  = Q_DEFAULT;
  localparam int unsigned M  = M_DEFAULT;
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1;
  localparam int          K     = 10000;
  localparam int          NMISS = 5000;
  localparam int          SLOTS = 1 << P;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          clear = 1'b0;
  logic          busy;
  logic          wr_en = 1'b0;
  logic [SW-1:0] wr_sel = '0;
  logic [N-1:0]  wr_vec = '0;
  logic [Q-1:0]  wr_index = '0;
  logic          in_valid = 1'b0;
  logic          in_ready;
  logic [N-1:0]  in_vec = '0;
  logic          out_valid;
  logic [Q-1:0]  out_index;

  pigu dut (.*);

  always #5 clk = ~clk;

  int     checks = 0;
  int     failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------ result checking
  typedef struct {
    logic [Q-1:0] idx;
    longint       t;
  } exp_t;
  exp_t expq[$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %0d at cycle %0d", out_index, cycle);
      end else begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (out_index != e.idx || cycle - e.t != 2) begin
          failures++;
          if (failures < 20)
            $display("FAIL: index %0d (expected %0d), latency %0d", out_index, e.idx,
                     cycle - e.t);
        end
      end
    end
  end

  // ----------------------------------------------------------- mechanisms
  int n_reset_clear, n_clear, n_hold_busy, n_hold_write, n_empty_miss, n_aux_miss;
  int n_remove, n_update;
  int unit_hits[M];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Called just after a rising edge; returns just after a later one.
  task automatic lookup(input logic [N-1:0] v, input logic [Q-1:0] expected);
    in_valid = 1'b1;
    in_vec   = v;
    #1;
    while (!in_ready) begin
      @(posedge clk);
      #1;
    end
    expq.push_back('{expected, cycle});
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  task automatic write(input int unit, input logic [N-1:0] v, input logic [Q-1:0] idx,
                       input logic [N-1:0] probe);
    wr_en    = 1'b1;
    wr_sel   = SW'(unit);
    wr_vec   = v;
    wr_index = idx;
    in_valid = 1'b1;   // a lookup offered together with a write must wait
    in_vec   = probe;
    #1;
    if (!in_ready) n_hold_write++;
    @(posedge clk);
    #1;
    wr_en    = 1'b0;
    in_valid = 1'b0;
  endtask

  task automatic wait_clear(output int len);
    len = 0;
    in_valid = 1'b1;   // offered during the clear: must not be taken
    in_vec   = '0;
    #1;
    while (busy) begin
      if (!in_ready) n_hold_busy++;
      @(posedge clk);
      #1;
      len++;
      if (len == 3) in_valid = 1'b0;
    end
    in_valid = 1'b0;
  endtask

  // ---------------------------------------------------------------- data
  logic [N-1:0]       vecs[];
  bit                 seen[logic [N-1:0]];
  int unsigned        h[];
  int                 unit[];
  bit                 occ[];

  initial begin
    int len;
    int matched;

    // Matching model on the seven-vector example (values 1..4, two functions).
    begin
      int unsigned ex[];
      int          exu[];
      bit          used[];
      int          ok;
      ex = '{1,1, 2,2, 3,3, 4,3, 2,4, 2,1, 4,1};
      check(cfp_partition(ex, 7, 2, 5, exu) == 7, "example partition incomplete");
      used = new[10];
      ok   = 1;
      for (int v = 0; v < 7; v++) begin
        int s;
        s = exu[v] * 5 + int'(ex[v * 2 + exu[v]]);
        if (exu[v] < 0 || used[s]) ok = 0;
        else used[s] = 1'b1;
      end
      check(ok == 1, "example partition has a conflict");
    end

    // Reset: the unit clears its tables by itself.
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(busy == 1'b1, "not busy after reset");
    wait_clear(len);
    check(len == SLOTS, $sformatf("reset clear took %0d cycles", len));
    if (len == SLOTS) n_reset_clear++;

    // Registered vectors.
    vecs = new[K];
    for (int v = 0; v < K; v++) begin
      logic [N-1:0] x;
      do x = N'($urandom); while (seen.exists(x));
      seen[x] = 1'b1;
      vecs[v] = x;
    end

    // Conflict-free partitioning.
    h = new[K * M];
    for (int v = 0; v < K; v++)
      for (int u = 0; u < int'(M); u++) h[v * M + u] = hash_of(vecs[v], u, N, P);
    matched = cfp_partition(h, K, M, SLOTS, unit);
    check(matched == K, $sformatf("partition covers %0d of %0d vectors", matched, K));
    occ = new[M * SLOTS];
    begin
      int conflicts;
      conflicts = 0;
      for (int v = 0; v < K; v++) begin
        int s;
        s = unit[v] * SLOTS + int'(h[v * M + unit[v]]);
        if (occ[s]) conflicts++;
        occ[s] = 1'b1;
      end
      check(conflicts == 0, "partition has conflicts");
    end
    $display("partition: %0d vectors in %0d units of %0d words", matched, M, SLOTS);

    // Load the tables.
    for (int v = 0; v < K; v++) write(unit[v], vecs[v], Q'(v + 1), vecs[(v + 1) % K]);

    // Every registered vector.
    for (int v = 0; v < K; v++) begin
      lookup(vecs[v], Q'(v + 1));
      unit_hits[unit[v]]++;
    end

    // Unregistered vectors.
    for (int i = 0; i < NMISS; i++) begin
      logic [N-1:0] x;
      bit           any;
      do x = N'($urandom); while (seen.exists(x));
      any = 1'b0;
      for (int u = 0; u < int'(M); u++) begin
        int s;
        s = u * SLOTS + int'(hash_of(x, u, N, P));
        if (occ[s]) any = 1'b1;
      end
      if (any) n_aux_miss++;
      else     n_empty_miss++;
      lookup(x, '0);
    end

    // Remove a vector, then register it again under another index.
    write(unit[0], vecs[0], '0, vecs[1]);
    lookup(vecs[0], '0);
    lookup(vecs[1], Q'(2));
    n_remove++;
    write(unit[0], vecs[0], Q'(12345), vecs[1]);
    lookup(vecs[0], Q'(12345));
    n_update++;

    // Explicit clear empties every table.
    repeat (4) @(posedge clk);
    #1 clear = 1'b1;
    @(posedge clk);
    #1 clear = 1'b0;
    wait_clear(len);
    check(len == SLOTS, $sformatf("clear took %0d cycles", len));
    n_clear++;
    for (int v = 0; v < 200; v++) lookup(vecs[v], '0);

    repeat (5) @(posedge clk);
    check(expq.size() == 0, "results missing");

    $display("hits per unit: %p", unit_hits);
    $display("reset_clear=%0d clear=%0d hold_busy=%0d hold_write=%0d empty_miss=%0d aux_miss=%0d remove=%0d update=%0d",
             n_reset_clear, n_clear, n_hold_busy, n_hold_write, n_empty_miss, n_aux_miss,
             n_remove, n_update);
    check(n_reset_clear > 0, "no reset clear");
    check(n_clear > 0, "no explicit clear");
    check(n_hold_busy > 0, "no lookup held off by busy");
    check(n_hold_write > 0, "no lookup held off by a write");
    check(n_empty_miss > 0, "no miss on empty words");
    check(n_aux_miss > 0, "no miss rejected by the AUX check");
    check(n_remove > 0, "no removal");
    check(n_update > 0, "no update");
    for (int u = 0; u < int'(M); u++) check(unit_hits[u] > 0, $sformatf("no hit in unit %0d", u));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
