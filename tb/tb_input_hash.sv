// tb_input_hash: checks the four input hash functions of the default
// parallel IGU (20-bit input, 12-bit hash). For random inputs each unit's
// hash and remaining bits must equal the values computed bit by bit from the
// function's definition (pivot bit XOR parity of masked non-pivot bits), and
// the input must be recoverable from (hash, rest), which is what allows the
// AUX memory to store only the N-P remaining bits. It also checks that
// the four functions differ.
module tb_input_hash;
  import pigu_pkg::*;

  localparam int unsigned N = N_DEFAULT;
  localparam int unsigned P = P_DEFAULT;
  localparam int unsigned M = M_DEFAULT;

  logic [N-1:0]   vec = '0;
  logic [P-1:0]   hash [M];
  logic [N-P-1:0] rest [M];

  for (genvar u = 0; u < M; u++) begin : g_dut
    input_hash #(.N(N), .P(P), .IGU(u)) dut (
      .vec (vec),
      .hash(hash[u]),
      .rest(rest[u])
    );
  end

  int checks = 0;
  int failures = 0;

  initial begin
    int differ;
    differ = 0;
    for (int i = 0; i < 3000; i++) begin
      vec = N'($urandom);
      #1;
      for (int u = 0; u < int'(M); u++) begin
        logic [N-1:0]   piv;
        logic [P-1:0]   h_exp;
        logic [N-P-1:0] r_exp;
        logic [N-1:0]   rebuilt;
        int             k;
        piv = '0;
        for (int j = 0; j < int'(P); j++) piv[(j + u * 5) % N] = 1'b1;
        // remaining bits, ascending
        k = 0;
        for (int b = 0; b < int'(N); b++)
          if (!piv[b]) begin
            r_exp[k] = vec[b];
            k++;
          end
        // hash bits
        for (int j = 0; j < int'(P); j++) begin
          logic [31:0] m;
          logic        par;
          m   = hash_xmask(0, u, j);
          par = 1'b0;
          for (int b = 0; b < int'(N); b++) if (m[b] && !piv[b]) par ^= vec[b];
          h_exp[j] = vec[(j + u * 5) % N] ^ par;
        end
        checks++;
        if (hash[u] != h_exp || rest[u] != r_exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL: unit %0d vec %h hash %h/%h rest %h/%h", u, vec, hash[u], h_exp,
                     rest[u], r_exp);
        end
        // Rebuild the input from the outputs.
        rebuilt = '0;
        k = 0;
        for (int b = 0; b < int'(N); b++)
          if (!piv[b]) begin
            rebuilt[b] = rest[u][k];
            k++;
          end
        for (int j = 0; j < int'(P); j++) begin
          logic [31:0] m;
          logic        par;
          m   = hash_xmask(0, u, j);
          par = 1'b0;
          for (int b = 0; b < int'(N); b++) if (m[b] && !piv[b]) par ^= rebuilt[b];
          rebuilt[(j + u * 5) % N] = hash[u][j] ^ par;
        end
        checks++;
        if (rebuilt != vec) begin
          failures++;
          if (failures < 10) $display("FAIL: unit %0d cannot rebuild %h (got %h)", u, vec, rebuilt);
        end
      end
      if (hash[0] != hash[1] && hash[1] != hash[2] && hash[2] != hash[3]) differ++;
    end
    checks++;
    if (differ < 2000) begin
      failures++;
      $display("FAIL: hash functions too similar (%0d)", differ);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
