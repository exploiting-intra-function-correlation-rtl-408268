// ghr_unit: the global history register with the intra-function correlation
// mechanisms.
//
// On every resolved control instruction (ev_valid) the register takes its
// next value by instruction class:
//   conditional : shift left, the outcome (taken = 1) enters at bit 0.
//   call        : with the BTB history mode, load the old-history field of
//                 the call's BTB entry on a hit with the call bit set, and
//                 zero otherwise; else with zeroing, clear; else keep.
//   return      : with the history stack on and a valid popped entry, take
//                 the pre-call history from the stack; with retaining on,
//                 only the top GHR_BITS-RETAIN bits are overwritten and the
//                 RETAIN newest outcomes of the callee are kept (r6: 6 of 8
//                 bits overwritten, 2 kept).
//   jump        : keep.
// These rules follow the published Global History Stack scheme; the ordering "BTB reload
// before zeroing" and the behaviour when the stack is empty (history left
// as it is) are this design's choices.
//
// Interface and timing: ghr is the registered history, valid in the cycle
// an instruction is presented and updated at the rising edge that consumes
// it. Reset (active-low, synchronous) clears it.
module ghr_unit
  import ghs_pkg::*;
#(
  parameter int unsigned GHR_BITS = 8,
  parameter int unsigned RETAIN   = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  ghs_cfg_t            cfg,
  input  logic                ev_valid,
  input  br_type_e            ev_type,
  input  logic                ev_taken,
  // history popped from the global history stack
  input  logic                pop_valid,
  input  logic [GHR_BITS-1:0] pop_ghr,
  // old-history field of the call's BTB entry (hit and call bit set)
  input  logic                btb_hist_valid,
  input  logic [GHR_BITS-1:0] btb_hist,
  output logic [GHR_BITS-1:0] ghr
);

  initial begin
    assert (RETAIN < GHR_BITS) else $error("ghr_unit: RETAIN must be below GHR_BITS");
  end

  // Mask of the history bits the stack overwrites on a restore.
  localparam logic [GHR_BITS-1:0] RESTORE_MASK = ~((GHR_BITS)'((1 << RETAIN) - 1));

  logic [GHR_BITS-1:0] ghr_next;

  always_comb begin
    ghr_next = ghr;
    if (ev_valid) begin
      unique case (ev_type)
        BR_COND: ghr_next = {ghr[GHR_BITS-2:0], ev_taken};
        BR_CALL: begin
          if (cfg.btb_hist_en)  ghr_next = btb_hist_valid ? btb_hist : '0;
          else if (cfg.zero_en) ghr_next = '0;
        end
        BR_RET: begin
          if (cfg.ghs_en && pop_valid) begin
            if (cfg.retain_en) ghr_next = (pop_ghr & RESTORE_MASK) | (ghr & ~RESTORE_MASK);
            else               ghr_next = pop_ghr;
          end
        end
        default: ghr_next = ghr;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ghr <= '0;
    else        ghr <= ghr_next;
  end

endmodule
