// igu_ram: writable look-up table memory of an index generation unit. The
// same module serves as the main memory (2^P words of Q bits, the predicted
// index) and as the AUX memory (words of N-P bits, the check bits).
//
// One write port and one read port, both on the rising edge of clk. A read
// is synchronous: raddr presented while re is high gives rdata one cycle
// later; rdata holds its value while re is low. A read of the address being
// written in the same cycle returns the old word. The array has no reset:
// entries are made valid by writing them (the PIGU top clears its main
// memories with a sweep of writes).
//
// That the tables are memories which can be rewritten follows the design
// description (registered vectors may change); the synchronous read port,
// chosen so the tables map onto SRAM blocks, is this design's own choice.
module igu_ram #(
  parameter int unsigned AW = 12,  // address width: 2^AW words
  parameter int unsigned W  = 14   // word width
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
