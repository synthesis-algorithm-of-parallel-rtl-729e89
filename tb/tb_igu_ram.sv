// tb_igu_ram: checks the look-up table memory against an array model.
// Random writes and reads on a 2^6 x 10 memory, with a read issued in the
// same cycle as most writes; the data read must match the model one cycle
// after the read address (old data on a same-address write), and must hold
// while the read enable is low.
module tb_igu_ram;
  localparam int unsigned AW = 6;
  localparam int unsigned W  = 10;

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [W-1:0]  wdata = '0;
  logic          re = 1'b0;
  logic [AW-1:0] raddr = '0;
  logic [W-1:0]  rdata;

  igu_ram #(.AW(AW), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int           checks = 0;
  int           failures = 0;
  logic [W-1:0] model [2**AW];
  logic [W-1:0] expect_q;
  bit           pending = 1'b0;

  initial begin
    // Fill every word first, so every later read has a known value.
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we    = 1'b1;
      waddr = AW'(a);
      wdata = W'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;

    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rdata != expect_q) begin
          failures++;
          $display("FAIL: read %h expected %h", rdata, expect_q);
        end
      end
      pending = 1'b0;
      re      = ($urandom_range(0, 3) != 0);
      raddr   = AW'($urandom);
      we      = ($urandom_range(0, 1) != 0);
      waddr   = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom);
      wdata   = W'($urandom);
      if (re) begin
        expect_q = model[raddr];  // old data when the same word is written
        pending  = 1'b1;
      end else begin
        // rdata must hold its last value.
        pending  = 1'b1;
        expect_q = rdata;
      end
      if (we) model[waddr] = wdata;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
