// btb_hist: branch target buffer with a call bit and an old-history field.
//
// A direct-mapped, tagged table. Each entry holds a valid bit, a tag, the
// target address, a call bit (the entry belongs to a call instruction) and
// an old-history field. When a call hits an entry whose call bit is set,
// the old-history field is the global history the callee ended with the last
// time it was called from this call site, and the predictor reloads it. When
// the callee returns, its final history is written into the entry of the
// call instruction, found from the return address minus one instruction.
//
// The extra fields, the call bit and the write-on-return are the design's;
// direct mapping, the index/tag split (index = PC[IDX+1:2], tag = the bits
// above), allocation of every taken direct branch, jump and call, and
// clearing the old-history field when an entry is (re)allocated are this
// design's choices. Returns are not entered: their target comes from the
// return address stack.
//
// Interface and timing:
//   lookup   : lk_pc -> lk_hit, lk_target, lk_call, lk_hist, combinational.
//   allocate : upd_valid writes tag, target and call bit at the clock edge.
//   history  : hw_valid with hw_pc (PC of the call) writes hw_hist into the
//              entry's old-history field at the clock edge when the entry
//              still belongs to that call. A history write and an allocation
//              of a different tag to the same entry in one cycle: the
//              allocation wins.
//   Active-low synchronous reset invalidates every entry.
module btb_hist #(
  parameter int unsigned ENTRIES  = 512,
  parameter int unsigned GHR_BITS = 8,
  parameter int unsigned PC_BITS  = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // lookup
  input  logic [PC_BITS-1:0]  lk_pc,
  output logic                lk_hit,
  output logic [PC_BITS-1:0]  lk_target,
  output logic                lk_call,
  output logic [GHR_BITS-1:0] lk_hist,
  // allocate / update
  input  logic                upd_valid,
  input  logic [PC_BITS-1:0]  upd_pc,
  input  logic [PC_BITS-1:0]  upd_target,
  input  logic                upd_call,
  // old-history write on return
  input  logic                hw_valid,
  input  logic [PC_BITS-1:0]  hw_pc,
  input  logic [GHR_BITS-1:0] hw_hist,
  output logic                hw_done
);

  localparam int unsigned IDX_BITS = $clog2(ENTRIES);
  localparam int unsigned TAG_BITS = PC_BITS - IDX_BITS - 2;

  typedef struct packed {
    logic [TAG_BITS-1:0] tag;
    logic [PC_BITS-1:0]  target;
    logic                call;
  } entry_t;

  logic                valid [ENTRIES];
  entry_t              ent   [ENTRIES];
  logic [GHR_BITS-1:0] hist  [ENTRIES];

  function automatic logic [IDX_BITS-1:0] idx_of(input logic [PC_BITS-1:0] pc);
    return pc[IDX_BITS+1:2];
  endfunction
  function automatic logic [TAG_BITS-1:0] tag_of(input logic [PC_BITS-1:0] pc);
    return pc[PC_BITS-1:IDX_BITS+2];
  endfunction

  logic [IDX_BITS-1:0] lk_idx, upd_idx, hw_idx;
  logic                upd_same;   // allocation rewrites the entry's own tag
  logic                hw_match;

  always_comb begin
    lk_idx    = idx_of(lk_pc);
    lk_hit    = valid[lk_idx] && (ent[lk_idx].tag == tag_of(lk_pc));
    lk_target = lk_hit ? ent[lk_idx].target : '0;
    lk_call   = lk_hit && ent[lk_idx].call;
    lk_hist   = lk_call ? hist[lk_idx] : '0;

    upd_idx   = idx_of(upd_pc);
    upd_same  = valid[upd_idx] && (ent[upd_idx].tag == tag_of(upd_pc));

    hw_idx    = idx_of(hw_pc);
    hw_match  = valid[hw_idx] && ent[hw_idx].call && (ent[hw_idx].tag == tag_of(hw_pc));
    hw_done   = hw_valid && hw_match &&
                !(upd_valid && (upd_idx == hw_idx) && !upd_same);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) valid[i] <= 1'b0;
    end else if (upd_valid) begin
      valid[upd_idx] <= 1'b1;
      ent[upd_idx]   <= '{tag: tag_of(upd_pc), target: upd_target, call: upd_call};
    end
  end

  // Old-history field: cleared on a fresh allocation, written on a return.
  always_ff @(posedge clk) begin
    if (hw_done)
      hist[hw_idx] <= hw_hist;
    if (upd_valid && !upd_same)
      hist[upd_idx] <= '0;
  end

endmodule
