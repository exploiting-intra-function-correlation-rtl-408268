// ghs_predictor: gshare branch predictor with the Global History Stack and
// the BTB old-history extension.
//
// A global predictor loses the caller's branch history whenever a callee's
// branches shift through the global history register (GHR). This predictor
// keeps it: every call pushes the pre-call GHR next to the return address on
// the return address stack, and every return pops it back (GHS). Around that:
//   zeroing    - a call clears the GHR, so a function starts from the same
//                history whatever its call site;
//   retaining  - a return keeps the callee's RETAIN newest outcomes in the low
//                GHR bits and restores only the upper bits (r6 at 8 bits);
//   BTB history- a return writes the callee's final GHR into the BTB entry of
//                its call instruction; the next time that call executes and
//                hits an entry with the call bit set, the GHR is reloaded
//                from it (0 on a miss).
// Each mechanism has a run-time enable in cfg; ghs_pkg names the evaluated
// combinations (CFG_BASELINE ... CFG_GHS_BTB_R6). Sizes default to a 4K-entry
// gshare table with 8 history bits, a 10-entry stack and a 512-entry BTB.
//
// Interface and timing: the predictor consumes the program's control
// instructions in program order, one per clock cycle, as they resolve
// (ev_valid with PC, class, actual direction and actual target). In that
// cycle the pred_* outputs give the prediction made from the state before
// the instruction, and mispredict compares it with the outcome; at the
// rising edge the table, BTB, stack and GHR are updated with the outcome.
// Updating the history with resolved outcomes only, one instruction per
// cycle, is this design's choice; speculative history and its repair are not
// modelled. The *_evt outputs pulse when a mechanism acts.
// Active-low reset is synchronous; after it the table counters are weakly
// not-taken, the BTB and the stack are empty and the GHR is zero.
module ghs_predictor
  import ghs_pkg::*;
#(
  parameter int unsigned PHT_ENTRIES = 4096,
  parameter int unsigned GHR_BITS    = 8,
  parameter int unsigned RAS_DEPTH   = 10,
  parameter int unsigned BTB_ENTRIES = 512,
  parameter int unsigned RETAIN      = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  ghs_cfg_t            cfg,
  // resolved control instruction
  input  logic                ev_valid,
  input  logic [PC_BITS-1:0]  ev_pc,
  input  br_type_e            ev_type,
  input  logic                ev_taken,
  input  logic [PC_BITS-1:0]  ev_target,
  // prediction for that instruction
  output logic                pred_taken,
  output logic                pred_target_valid,
  output logic [PC_BITS-1:0]  pred_target,
  output logic                mispredict,
  output logic [GHR_BITS-1:0] ghr,
  // mechanism activity
  output logic                ghs_restore_evt,
  output logic                btb_reload_evt,
  output logic                btb_save_evt,
  output logic                ras_overflow_evt,
  output logic                ras_underflow_evt
);

  logic is_cond, is_jump, is_call, is_ret;
  always_comb begin
    is_cond = ev_valid && ev_type == BR_COND;
    is_jump = ev_valid && ev_type == BR_JUMP;
    is_call = ev_valid && ev_type == BR_CALL;
    is_ret  = ev_valid && ev_type == BR_RET;
  end

  // ---------------- direction predictor ----------------
  logic                           pht_taken;
  logic [$clog2(PHT_ENTRIES)-1:0] pht_idx;

  gshare_pht #(.PHT_ENTRIES(PHT_ENTRIES), .GHR_BITS(GHR_BITS), .PC_BITS(PC_BITS)) u_pht (
    .clk, .rst_n,
    .lk_pc(ev_pc), .lk_ghr(ghr), .lk_taken(pht_taken), .lk_idx(pht_idx),
    .upd_valid(is_cond), .upd_pc(ev_pc), .upd_ghr(ghr), .upd_taken(ev_taken)
  );

  // ---------------- global history stack ----------------
  logic                ras_valid;
  logic [PC_BITS-1:0]  ras_addr;
  logic [GHR_BITS-1:0] ras_ghr;

  ghs_ras #(.DEPTH(RAS_DEPTH), .GHR_BITS(GHR_BITS), .PC_BITS(PC_BITS)) u_ras (
    .clk, .rst_n,
    .push(is_call), .push_addr(ev_pc + PC_BITS'(INSTR_BYTES)), .push_ghr(ghr),
    .pop(is_ret),
    .top_valid(ras_valid), .top_addr(ras_addr), .top_ghr(ras_ghr),
    .overflow(ras_overflow_evt), .underflow(ras_underflow_evt)
  );

  // ---------------- BTB with old-history field ----------------
  logic                btb_hit, btb_call;
  logic [PC_BITS-1:0]  btb_target;
  logic [GHR_BITS-1:0] btb_hist;
  logic                btb_alloc, btb_hw;

  always_comb begin
    btb_alloc = (is_cond && ev_taken) || is_jump || is_call;
    btb_hw    = is_ret && cfg.btb_hist_en;
  end

  btb_hist #(.ENTRIES(BTB_ENTRIES), .GHR_BITS(GHR_BITS), .PC_BITS(PC_BITS)) u_btb (
    .clk, .rst_n,
    .lk_pc(ev_pc), .lk_hit(btb_hit), .lk_target(btb_target), .lk_call(btb_call),
    .lk_hist(btb_hist),
    .upd_valid(btb_alloc), .upd_pc(ev_pc), .upd_target(ev_target), .upd_call(is_call),
    // the call sits one instruction before the address the return goes to
    .hw_valid(btb_hw), .hw_pc(ev_target - PC_BITS'(INSTR_BYTES)), .hw_hist(ghr),
    .hw_done(btb_save_evt)
  );

  // ---------------- global history register ----------------
  ghr_unit #(.GHR_BITS(GHR_BITS), .RETAIN(RETAIN)) u_ghr (
    .clk, .rst_n, .cfg,
    .ev_valid, .ev_type, .ev_taken,
    .pop_valid(ras_valid), .pop_ghr(ras_ghr),
    .btb_hist_valid(btb_call), .btb_hist(btb_hist),
    .ghr
  );

  always_comb begin
    ghs_restore_evt = is_ret && cfg.ghs_en && ras_valid;
    btb_reload_evt  = is_call && cfg.btb_hist_en && btb_call;
  end

  // ---------------- prediction and its check ----------------
  always_comb begin
    pred_taken        = 1'b1;
    pred_target_valid = btb_hit;
    pred_target       = btb_target;
    unique case (ev_type)
      BR_COND: pred_taken = pht_taken;
      BR_RET: begin
        pred_target_valid = ras_valid;
        pred_target       = ras_addr;
      end
      default: ;
    endcase
    if (!ev_valid)
      mispredict = 1'b0;
    else if (pred_taken != ev_taken)
      mispredict = 1'b1;
    else if (ev_taken)
      mispredict = !pred_target_valid || pred_target != ev_target;
    else
      mispredict = 1'b0;
  end

  // Unconditional control instructions are always taken.
  property p_uncond_taken;
    @(posedge clk) disable iff (!rst_n) (ev_valid && ev_type != BR_COND) |-> ev_taken;
  endproperty
  a_uncond_taken: assert property (p_uncond_taken)
    else $error("ghs_predictor: jump, call or return presented as not taken");

endmodule
