// tb_pigu_workloads: the evaluated workloads on the parallel IGU.
//
//  - Random sets of 20-bit registered vectors with k = 1000, 1500, ...,
//    10000 on the default configuration (four units, 2^12-word tables,
//    14-bit index): each set is partitioned, loaded and fully looked up.
//  - k = 10000 on the three-unit configuration (M = 3, P = 12) and on the
//    two-unit configuration (M = 2, P = 14), the table sizes at which those
//    configurations hold 10000 vectors in the memory-size comparison.
//  - The smallest four-unit tables for k = 1000, 2000, 4000 and 8000
//    (P = 8, 9, 10, 11: 97.7% of all table words used), with up to four
//    hash sets tried per size.
//  - The four-vector, 4-input example function: every one of the 16 inputs
//    must give its index, e.g. 0110 -> 1 and 0101 -> 0 (not registered).
module tb_pigu_workloads;
  import pigu_pkg::*;
  import cfp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic done4, done3, done2;
  int   c4, c3, c2, f4, f3, f2, s4, s3, s2;

  pigu_sweep #(.KMIN(1000), .KMAX(10000), .KSTEP(500), .NMISS(1000)) u_m4 (
    .clk, .rst_n, .done(done4), .checks(c4), .failures(f4), .sizes_ok(s4));
  pigu_sweep #(.M(3), .P(12), .KMIN(10000), .KMAX(10000), .KSTEP(1), .NMISS(2000)) u_m3 (
    .clk, .rst_n, .done(done3), .checks(c3), .failures(f3), .sizes_ok(s3));
  pigu_sweep #(.M(2), .P(14), .KMIN(10000), .KMAX(10000), .KSTEP(1), .NMISS(2000)) u_m2 (
    .clk, .rst_n, .done(done2), .checks(c2), .failures(f2), .sizes_ok(s2));

  logic donet[4];
  int   ct[4], ft[4], st[4];
  for (genvar i = 0; i < 4; i++) begin : g_tight
    localparam int KT = 1000 << i;
    pigu_sweep #(.P(8 + i), .KMIN(KT), .KMAX(KT), .KSTEP(1), .NMISS(500), .NSEED(4)) u_t (
      .clk, .rst_n, .done(donet[i]), .checks(ct[i]), .failures(ft[i]), .sizes_ok(st[i]));
  end

  // ------------------------------------------------- the 4-input example
  localparam int unsigned EN = 4, EP = 2, EQ = 3, EM = 2;
  logic          e_clear = 1'b0;
  logic          e_busy;
  logic          e_wr_en = 1'b0;
  logic          e_wr_sel = 1'b0;
  logic [EN-1:0] e_wr_vec = '0;
  logic [EQ-1:0] e_wr_index = '0;
  logic          e_in_valid = 1'b0;
  logic          e_in_ready;
  logic [EN-1:0] e_in_vec = '0;
  logic          e_out_valid;
  logic [EQ-1:0] e_out_index;

  pigu #(.N(EN), .P(EP), .Q(EQ), .M(EM)) u_ex (
    .clk, .rst_n, .clear(e_clear), .busy(e_busy), .wr_en(e_wr_en), .wr_sel(e_wr_sel),
    .wr_vec(e_wr_vec), .wr_index(e_wr_index), .in_valid(e_in_valid), .in_ready(e_in_ready),
    .in_vec(e_in_vec), .out_valid(e_out_valid), .out_index(e_out_index));

  // (x1, x2, x3, x4) with x1 as the most significant bit.
  localparam logic [EN-1:0] EX_VEC [4] = '{4'b0110, 4'b0010, 4'b1101, 4'b0111};
  bit ex_done = 1'b0;

  initial begin
    int unsigned eh[];
    int          eu[];
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    while (e_busy) begin
      @(posedge clk);
      #1;
    end
    eh = new[4 * EM];
    for (int v = 0; v < 4; v++)
      for (int u = 0; u < int'(EM); u++) eh[v * EM + u] = hash_of(EX_VEC[v], u, EN, EP);
    checks++;
    if (cfp_partition(eh, 4, EM, 1 << EP, eu) != 4) begin
      failures++;
      $display("FAIL: example partition");
    end
    for (int v = 0; v < 4; v++) begin
      e_wr_en    = 1'b1;
      e_wr_sel   = eu[v][0];
      e_wr_vec   = EX_VEC[v];
      e_wr_index = EQ'(v + 1);
      @(posedge clk);
      #1;
    end
    e_wr_en = 1'b0;
    for (int x = 0; x < 16; x++) begin
      logic [EQ-1:0] expected;
      expected = '0;
      for (int v = 0; v < 4; v++) if (EX_VEC[v] == EN'(x)) expected = EQ'(v + 1);
      e_in_valid = 1'b1;
      e_in_vec   = EN'(x);
      @(posedge clk);
      #1 e_in_valid = 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (!e_out_valid || e_out_index != expected) begin
        failures++;
        $display("FAIL: example input %b gave %0d (valid %0d), expected %0d", x[3:0],
                 e_out_index, e_out_valid, expected);
      end
    end
    ex_done = 1'b1;
  end

  initial begin
    wait (done4 && done3 && done2 && ex_done && donet[0] && donet[1] && donet[2] && donet[3]);
    checks   += c4 + c3 + c2;
    failures += f4 + f3 + f2;
    for (int i = 0; i < 4; i++) begin
      checks   += ct[i] + 1;
      failures += ft[i];
      if (st[i] != 1) failures++;
    end
    checks += 3;
    if (s4 != 19) failures++;
    if (s3 != 1)  failures++;
    if (s2 != 1)  failures++;
    $display("sizes partitioned: M=4 %0d of 19, M=3 %0d of 1, M=2 %0d of 1, tight %0d%0d%0d%0d",
             s4, s3, s2, st[0], st[1], st[2], st[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
