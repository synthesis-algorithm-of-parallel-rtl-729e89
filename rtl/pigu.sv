// pigu: parallel index generation unit, the top of the design.
//
// The index generation function returns, for an N-bit input vector, the
// index (1..k) of that vector in a table of k registered vectors, or 0 if it
// is not registered. A single index generation unit (IGU) needs a main
// memory with enough address bits to separate all k vectors by their hash,
// which grows roughly with k^2. This top instead splits the registered
// vectors over M equal IGUs, each behind its own input hash function F_i.
// The split is made offline so that, inside each unit, no two of its vectors
// share a hash value (conflict-free partitioning by bipartite matching);
// each vector then lives in exactly one unit and at most one unit returns a
// non-zero index, so the unit outputs are simply ORed bit by bit.
//
// Structure (after the design description): M x (input_hash -> igu), bitwise
// OR of the M indices. Each igu holds a 2^P x Q main memory and a 2^P x (N-P)
// AUX memory addressed by the hash, so the tables total 2^P*(N-P+Q)*M bits.
//
// Added by this design (the description does not cover loading the tables):
//   - a table write port: wr_en writes vector wr_vec with index wr_index into
//     unit wr_sel (hash and check bits are computed here); wr_index = 0
//     removes the vector. The writer chooses wr_sel from the partition.
//   - a clear sequencer that writes index 0 to all 2^P main-memory words of
//     every unit, 2^P cycles, started by reset and by the clear input; busy
//     is high meanwhile and writes and lookups are not accepted.
//   - lookups and writes share the hash units: a lookup is accepted when
//     in_valid and in_ready; in_ready = !busy && !wr_en.
//
// Timing: an accepted lookup gives out_valid/out_index two cycles later (one
// for the synchronous table read, one for the registered OR), one lookup
// per cycle. A write affects lookups accepted after it.
module pigu
  import pigu_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned P = P_DEFAULT,
  parameter int unsigned Q = Q_DEFAULT,
  parameter int unsigned M = M_DEFAULT,
  parameter int unsigned HASH_SEED = 0,  // selects the set of hash functions
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // table maintenance
  input  logic          clear,
  output logic          busy,
  input  logic          wr_en,
  input  logic [SW-1:0] wr_sel,
  input  logic [N-1:0]  wr_vec,
  input  logic [Q-1:0]  wr_index,
  // lookup
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [N-1:0]  in_vec,
  output logic          out_valid,
  output logic [Q-1:0]  out_index
);

  typedef enum logic {S_IDLE, S_CLEAR} state_t;

  state_t         state;
  logic [P-1:0]   clr_addr;
  logic           clearing;
  logic           wr_ok;
  logic           lk_ok;
  logic [N-1:0]   hvec;

  logic [Q-1:0]   res_index [M];
  logic [M-1:0]   res_valid;
  logic [M-1:0]   res_hit;
  logic [Q-1:0]   or_index;

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_CLEAR;
      clr_addr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (clear) begin
          state    <= S_CLEAR;
          clr_addr <= '0;
        end
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (&clr_addr) state <= S_IDLE;
        end
      endcase
    end
  end

  assign clearing = (state == S_CLEAR);
  assign busy     = clearing;
  assign wr_ok    = wr_en && !busy;
  assign in_ready = !busy && !wr_en;
  assign lk_ok    = in_valid && in_ready;
  assign hvec     = wr_en ? wr_vec : in_vec;

  // ------------------------------------------------------- hash units, IGUs
  for (genvar i = 0; i < M; i++) begin : g_unit
    logic [P-1:0]   hash;
    logic [N-P-1:0] rest;
    logic           u_wr;

    input_hash #(.N(N), .P(P), .IGU(i), .SEED(HASH_SEED)) u_hash (
      .vec (hvec),
      .hash(hash),
      .rest(rest)
    );

    assign u_wr = clearing || (wr_ok && (wr_sel == SW'(i)));

    igu #(.N(N), .P(P), .Q(Q), .AUX_BY_INDEX(1'b0)) u_igu (
      .clk      (clk),
      .rst_n    (rst_n),
      .lk_valid (lk_ok),
      .lk_hash  (hash),
      .lk_rest  (rest),
      .res_valid(res_valid[i]),
      .res_index(res_index[i]),
      .wr_en    (u_wr),
      .wr_hash  (clearing ? clr_addr : hash),
      .wr_index (clearing ? '0 : wr_index),
      .wr_rest  (clearing ? '0 : rest)
    );

    assign res_hit[i] = |res_index[i];
  end

  // ------------------------------------------------------------- OR of units
  always_comb begin
    or_index = '0;
    for (int i = 0; i < M; i++) or_index |= res_index[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_index <= '0;
    end else begin
      out_valid <= |res_valid;
      if (|res_valid) out_index <= or_index;
    end
  end

  // A registered vector must live in one unit only: the OR is then exact.
  assert property (@(posedge clk) disable iff (!rst_n)
                   |res_valid |-> $onehot0(res_hit))
    else $error("pigu: more than one IGU returned a non-zero index");

  // Table writes are ignored while the clear sweep runs.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !wr_en)
    else $error("pigu: table write while busy");

endmodule
