// igu: index generation unit (IGU).
//
// An IGU looks up a P-bit hash of the input vector in its main memory, which
// predicts the index of the registered vector with that hash (0 if none).
// The prediction is right for every registered vector but may be a wrong
// non-zero index for a vector that is not registered, so the AUX memory
// supplies the N-P remaining bits that the predicted vector must have. An
// equality comparator checks them against the input's remaining bits and an
// AND gate forces the index to 0 on a mismatch. Main memory, AUX memory,
// comparator and AND gate are the structure of the design description; the
// hash itself is outside (input_hash).
//
// AUX addressing (parameter AUX_BY_INDEX):
//   1  the AUX memory is addressed by the predicted index, 2^Q words of N-P
//      bits: the stand-alone IGU, main -> AUX -> compare in series.
//   0  the AUX memory is addressed by the hash, 2^P words of N-P bits, and is
//      read alongside the main memory. Inside a parallel IGU every hash value
//      holds at most one vector, so this is equivalent and gives the memory
//      size 2^P * (N - P + Q) per unit used for the parallel structure. This
//      is the default.
//
// Timing: both memories read synchronously. A lookup (lk_valid with lk_hash,
// lk_rest) gives res_valid/res_index LAT cycles later, LAT = 1 + AUX_BY_INDEX;
// res_index is combinational from the memory outputs and the stage
// registers. One lookup per cycle. A write (wr_en) stores wr_index at main
// address wr_hash and wr_rest at the AUX address (wr_index or wr_hash); it
// takes effect for lookups issued in later cycles. Writing index 0 removes an
// entry. The memory contents have no reset.
module igu
  import pigu_pkg::*;
#(
  parameter int unsigned N            = N_DEFAULT,
  parameter int unsigned P            = P_DEFAULT,
  parameter int unsigned Q            = Q_DEFAULT,
  parameter bit          AUX_BY_INDEX = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  // lookup
  input  logic           lk_valid,
  input  logic [P-1:0]   lk_hash,
  input  logic [N-P-1:0] lk_rest,
  output logic           res_valid,
  output logic [Q-1:0]   res_index,
  // table write
  input  logic           wr_en,
  input  logic [P-1:0]   wr_hash,
  input  logic [Q-1:0]   wr_index,
  input  logic [N-P-1:0] wr_rest
);

  localparam int unsigned R      = N - P;
  localparam int unsigned AUX_AW = AUX_BY_INDEX ? Q : P;

  logic [Q-1:0]        main_q;
  logic [R-1:0]        aux_q;
  logic [AUX_AW-1:0]   aux_waddr;
  logic [AUX_AW-1:0]   aux_raddr;
  logic                aux_re;
  logic [Q-1:0]        idx_pred;   // predicted index, aligned with aux_q
  logic [R-1:0]        rest_chk;   // input bits to compare, aligned with aux_q
  logic                chk_valid;
  logic                match;

  igu_ram #(.AW(P), .W(Q)) u_main (
    .clk  (clk),
    .we   (wr_en),
    .waddr(wr_hash),
    .wdata(wr_index),
    .re   (lk_valid),
    .raddr(lk_hash),
    .rdata(main_q)
  );

  igu_ram #(.AW(AUX_AW), .W(R)) u_aux (
    .clk  (clk),
    .we   (wr_en),
    .waddr(aux_waddr),
    .wdata(wr_rest),
    .re   (aux_re),
    .raddr(aux_raddr),
    .rdata(aux_q)
  );

  if (AUX_BY_INDEX) begin : g_by_index
    logic         v1, v2;
    logic [R-1:0] rest1, rest2;
    logic [Q-1:0] idx2;

    assign aux_waddr = wr_index;
    assign aux_raddr = main_q;
    assign aux_re    = v1;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v1 <= 1'b0;
        v2 <= 1'b0;
      end else begin
        v1 <= lk_valid;
        v2 <= v1;
      end
    end

    always_ff @(posedge clk) begin
      if (lk_valid) rest1 <= lk_rest;
      if (v1) begin
        rest2 <= rest1;
        idx2  <= main_q;
      end
    end

    assign idx_pred  = idx2;
    assign rest_chk  = rest2;
    assign chk_valid = v2;
  end else begin : g_by_hash
    logic         v1;
    logic [R-1:0] rest1;

    assign aux_waddr = wr_hash;
    assign aux_raddr = lk_hash;
    assign aux_re    = lk_valid;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v1 <= 1'b0;
      else        v1 <= lk_valid;
    end

    always_ff @(posedge clk) begin
      if (lk_valid) rest1 <= lk_rest;
    end

    assign idx_pred  = main_q;
    assign rest_chk  = rest1;
    assign chk_valid = v1;
  end

  // Comparator and AND gate.
  assign match     = (aux_q == rest_chk);
  assign res_index = idx_pred & {Q{match}};
  assign res_valid = chk_valid;

endmodule
