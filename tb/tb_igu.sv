// tb_igu: checks the index generation unit in both AUX addressing modes on
// a small size (10-bit vectors, 5-bit hash, 6-bit index).
//
// The main memory is cleared, then 20 vectors with distinct hash values are
// registered with indices 1..20. Lookups, one per cycle, mix registered
// vectors (must return their index), vectors sharing a registered hash but
// differing in the remaining bits (must be rejected by the AUX check and
// return 0) and vectors whose hash is unused (main memory gives 0). The
// result must appear 1 cycle after the lookup with AUX addressed by the hash
// and 2 cycles after with AUX addressed by the predicted index. Finally an
// entry is removed and another re-indexed, with lookups right after the
// writes.
module tb_igu;
  localparam int unsigned N = 10;
  localparam int unsigned P = 5;
  localparam int unsigned Q = 6;
  localparam int unsigned R = N - P;
  localparam int          K = 20;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         lk_valid = 1'b0;
  logic [P-1:0] lk_hash = '0;
  logic [R-1:0] lk_rest = '0;
  logic         wr_en = 1'b0;
  logic [P-1:0] wr_hash = '0;
  logic [Q-1:0] wr_index = '0;
  logic [R-1:0] wr_rest = '0;
  logic         res_valid [2];
  logic [Q-1:0] res_index [2];

  igu #(.N(N), .P(P), .Q(Q), .AUX_BY_INDEX(1'b0)) dut_h (
    .clk, .rst_n, .lk_valid, .lk_hash, .lk_rest,
    .res_valid(res_valid[0]), .res_index(res_index[0]),
    .wr_en, .wr_hash, .wr_index, .wr_rest
  );

  igu #(.N(N), .P(P), .Q(Q), .AUX_BY_INDEX(1'b1)) dut_i (
    .clk, .rst_n, .lk_valid, .lk_hash, .lk_rest,
    .res_valid(res_valid[1]), .res_index(res_index[1]),
    .wr_en, .wr_hash, .wr_index, .wr_rest
  );

  always #5 clk = ~clk;

  int     checks = 0;
  int     failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [Q-1:0] idx;
    longint       t;
  } exp_t;
  exp_t expq [2][$];

  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(negedge clk) begin
      if (rst_n && res_valid[d]) begin
        if (expq[d].size() == 0) begin
          failures++;
          $display("FAIL: dut %0d unexpected result", d);
        end else begin
          exp_t e;
          e = expq[d].pop_front();
          checks++;
          if (res_index[d] != e.idx || cycle - e.t != longint'(d + 1)) begin
            failures++;
            $display("FAIL: dut %0d index %0d expected %0d latency %0d", d, res_index[d],
                     e.idx, cycle - e.t);
          end
        end
      end
    end
  end

  // Model of the registered set.
  logic [Q-1:0] idx_of [2**P];   // 0 = hash value unused
  logic [R-1:0] rest_of [2**P];
  int n_hit, n_aux_reject, n_empty;

  task automatic write(input logic [P-1:0] h, input logic [Q-1:0] idx, input logic [R-1:0] r);
    @(negedge clk);
    wr_en    = 1'b1;
    wr_hash  = h;
    wr_index = idx;
    wr_rest  = r;
    idx_of[h]  = idx;
    rest_of[h] = r;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  // Drives a lookup for one cycle; back-to-back calls give one per cycle.
  task automatic lookup(input logic [P-1:0] h, input logic [R-1:0] r);
    logic [Q-1:0] e;
    @(negedge clk);
    lk_valid = 1'b1;
    lk_hash  = h;
    lk_rest  = r;
    e = (idx_of[h] != 0 && rest_of[h] == r) ? idx_of[h] : '0;
    if (e != 0)                n_hit++;
    else if (idx_of[h] != 0)   n_aux_reject++;
    else                       n_empty++;
    expq[0].push_back('{e, cycle});
    expq[1].push_back('{e, cycle});
  endtask

  initial begin
    int order [2**P];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int h = 0; h < 2**P; h++) write(P'(h), '0, '0);

    // K distinct hash values in random order.
    for (int h = 0; h < 2**P; h++) order[h] = h;
    order.shuffle();
    for (int v = 0; v < K; v++) write(P'(order[v]), Q'(v + 1), R'($urandom));

    for (int i = 0; i < 600; i++) begin
      int          v;
      logic [R-1:0] r;
      v = $urandom_range(0, 2**P - 1);
      r = ($urandom_range(0, 2) != 0) ? rest_of[order[v]] : R'($urandom);
      lookup(P'(order[v]), r);
    end
    @(negedge clk) lk_valid = 1'b0;

    // Remove one entry, re-index another, look up right after each write.
    write(P'(order[0]), '0, '0);
    lookup(P'(order[0]), rest_of[order[0]]);
    @(negedge clk) lk_valid = 1'b0;
    write(P'(order[1]), Q'(33), rest_of[order[1]]);
    lookup(P'(order[1]), rest_of[order[1]]);
    @(negedge clk) lk_valid = 1'b0;

    repeat (4) @(negedge clk);
    checks++;
    if (expq[0].size() != 0 || expq[1].size() != 0) begin
      failures++;
      $display("FAIL: results missing");
    end
    $display("hits=%0d aux_rejects=%0d empty=%0d", n_hit, n_aux_reject, n_empty);
    checks++;
    if (n_hit == 0 || n_aux_reject == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL: a lookup case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
