// gshare_pht: gshare direction predictor, a pattern history table of 2-bit
// saturating counters.
//
// The table index is the word address of the branch (PC with the two byte
// bits dropped) XOR the global history, the history lying on the low index
// bits. A counter value of 2 or 3 predicts taken. The gshare hashing, the
// 4K-entry table and the 8-bit history are the predictor the design is built
// around; the reset value (all counters weakly not-taken, 2'b01) and the
// placement of the history on the low index bits are this design's choices.
//
// Interface and timing:
//   lookup : lk_pc, lk_ghr -> lk_taken, lk_idx, combinational.
//   update : upd_valid with upd_pc, upd_ghr (the history the branch was
//            predicted with) and upd_taken trains one counter at the rising
//            clock edge.
//   rst_n  : synchronous-to-clock, active-low reset of every counter.
module gshare_pht #(
  parameter int unsigned PHT_ENTRIES = 4096,
  parameter int unsigned GHR_BITS    = 8,
  parameter int unsigned PC_BITS     = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // lookup
  input  logic [PC_BITS-1:0]             lk_pc,
  input  logic [GHR_BITS-1:0]            lk_ghr,
  output logic                           lk_taken,
  output logic [$clog2(PHT_ENTRIES)-1:0] lk_idx,
  // update
  input  logic                           upd_valid,
  input  logic [PC_BITS-1:0]             upd_pc,
  input  logic [GHR_BITS-1:0]            upd_ghr,
  input  logic                           upd_taken
);

  localparam int unsigned IDX_BITS = $clog2(PHT_ENTRIES);

  initial begin
    assert (GHR_BITS <= IDX_BITS)
      else $error("gshare_pht: GHR_BITS must not exceed the index width");
  end

  // Packed so that reset can load every counter in one assignment.
  logic [PHT_ENTRIES-1:0][1:0] pht;

  function automatic logic [IDX_BITS-1:0] hash(input logic [PC_BITS-1:0] pc,
                                               input logic [GHR_BITS-1:0] hist);
    logic [IDX_BITS-1:0] h;
    h = pc[IDX_BITS+1:2];
    h[GHR_BITS-1:0] = h[GHR_BITS-1:0] ^ hist;
    return h;
  endfunction

  logic [IDX_BITS-1:0] upd_idx;
  logic [1:0]          upd_ctr;

  always_comb begin
    lk_idx   = hash(lk_pc, lk_ghr);
    lk_taken = pht[lk_idx][1];
    upd_idx  = hash(upd_pc, upd_ghr);
    upd_ctr  = pht[upd_idx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pht <= {PHT_ENTRIES{2'b01}};
    end else if (upd_valid) begin
      if (upd_taken && upd_ctr != 2'b11)       pht[upd_idx] <= upd_ctr + 2'd1;
      else if (!upd_taken && upd_ctr != 2'b00) pht[upd_idx] <= upd_ctr - 2'd1;
    end
  end

endmodule
