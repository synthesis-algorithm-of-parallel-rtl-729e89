// pigu_sweep: testbench helper that runs one parallel IGU configuration
// through a series of registered-vector set sizes k = KMIN, KMIN+KSTEP, ...,
// KMAX. For each size it clears the tables, draws k distinct random N-bit
// vectors, partitions them with the matching model, loads them with indices
// 1..k, and looks up every registered vector plus NMISS unregistered ones
// (expected index 0). Results must arrive two cycles after the lookup.
// With NSEED > 1 it holds NSEED copies of the unit built with hash sets
// 0..NSEED-1 and, for each size, uses the first hash set under which the
// partition covers all vectors, as a table builder would when it retries
// with new hash functions. It raises done when finished and reports its
// check and failure counts and the number of sizes it could partition.
module pigu_sweep
  import pigu_pkg::*;
  import cfp_pkg::*;
#(
  parameter int unsigned N     = N_DEFAULT,
  parameter int unsigned P     = P_DEFAULT,
  parameter int unsigned Q     = Q_DEFAULT,
  parameter int unsigned M     = M_DEFAULT,
  parameter int          KMIN  = 1000,
  parameter int          KMAX  = 10000,
  parameter int          KSTEP = 1000,
  parameter int          NMISS = 1000,
  parameter int          NSEED = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   sizes_ok
);

  localparam int unsigned SW    = (M > 1) ? $clog2(M) : 1;
  localparam int          SLOTS = 1 << P;

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
  int            sel = 0;     // hash set in use

  logic          busy_s      [NSEED];
  logic          in_ready_s  [NSEED];
  logic          out_valid_s [NSEED];
  logic [Q-1:0]  out_index_s [NSEED];

  for (genvar s = 0; s < NSEED; s++) begin : g_seed
    pigu #(.N(N), .P(P), .Q(Q), .M(M), .HASH_SEED(s)) dut (
      .clk, .rst_n, .clear, .busy(busy_s[s]), .wr_en, .wr_sel, .wr_vec, .wr_index,
      .in_valid, .in_ready(in_ready_s[s]), .in_vec, .out_valid(out_valid_s[s]),
      .out_index(out_index_s[s]));
  end

  assign busy      = busy_s[sel];
  assign in_ready  = in_ready_s[sel];
  assign out_valid = out_valid_s[sel];
  assign out_index = out_index_s[sel];

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [Q-1:0] idx;
    longint       t;
  } exp_t;
  exp_t expq[$];

  initial begin
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    sizes_ok = 0;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: M=%0d P=%0d unexpected result", M, P);
      end else begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (out_index != e.idx || cycle - e.t != 2) begin
          failures++;
          if (failures < 10)
            $display("FAIL: M=%0d P=%0d index %0d expected %0d latency %0d", M, P,
                     out_index, e.idx, cycle - e.t);
        end
      end
    end
  end

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

  logic [N-1:0] vecs[];
  int unsigned  h[];
  int           unit[];

  initial begin
    @(posedge rst_n);
    for (int k = KMIN; k <= KMAX; k += KSTEP) begin
      bit seen[logic [N-1:0]];
      int matched;
      seen.delete();

      // Clear the tables (also right after reset).
      @(posedge clk);
      #1;
      if (!busy) begin
        clear = 1'b1;
        @(posedge clk);
        #1 clear = 1'b0;
      end
      while (busy) begin
        @(posedge clk);
        #1;
      end

      vecs = new[k];
      for (int v = 0; v < k; v++) begin
        logic [N-1:0] x;
        do x = N'($urandom); while (seen.exists(x));
        seen[x] = 1'b1;
        vecs[v] = x;
      end
      h = new[k * M];
      matched = 0;
      for (int s = 0; s < NSEED && matched != k; s++) begin
        for (int v = 0; v < k; v++)
          for (int u = 0; u < int'(M); u++) h[v * M + u] = hash_of(vecs[v], u, N, P, s);
        matched = cfp_partition(h, k, M, SLOTS, unit);
        sel = s;
      end
      checks++;
      if (matched != k) begin
        failures++;
        $display("FAIL: M=%0d P=%0d k=%0d partition covers %0d", M, P, k, matched);
        continue;
      end
      sizes_ok++;

      for (int v = 0; v < k; v++) begin
        wr_en    = 1'b1;
        wr_sel   = SW'(unit[v]);
        wr_vec   = vecs[v];
        wr_index = Q'(v + 1);
        @(posedge clk);
        #1;
      end
      wr_en = 1'b0;

      for (int v = 0; v < k; v++) lookup(vecs[v], Q'(v + 1));
      for (int i = 0; i < NMISS; i++) begin
        logic [N-1:0] x;
        do x = N'($urandom); while (seen.exists(x));
        lookup(x, '0);
      end
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (expq.size() != 0) begin
        failures++;
        $display("FAIL: M=%0d P=%0d k=%0d results missing", M, P, k);
        expq.delete();
      end
      $display("M=%0d P=%0d k=%0d hash set %0d: %0d of %0d table words used, checks %0d, failures %0d",
               M, P, k, sel, k, M * SLOTS, checks, failures);
    end
    done = 1'b1;
  end

endmodule
