// ghs_pkg: types and constants shared by the Global History Stack branch
// predictor.
//
// The predictor sees the program's control instructions one at a time, each
// tagged with its decoded class (br_type_e). Four run-time mode bits
// (ghs_cfg_t) select which of the intra-function correlation mechanisms are
// active, so the same hardware can run as a plain gshare predictor, with
// zeroing, with the history stack, with retaining, or with the BTB history
// field. Instructions are 4 bytes wide (Alpha AXP style): a call's return
// address is its own PC plus 4, and the PC of the call that belongs to a
// return address is that address minus 4.
package ghs_pkg;

  localparam int unsigned PC_BITS    = 32;
  localparam int unsigned INSTR_BYTES = 4;

  // Class of a control instruction, as given by decode/predecode.
  typedef enum logic [1:0] {
    BR_COND = 2'd0,  // conditional branch: predicted by gshare, shifts the GHR
    BR_JUMP = 2'd1,  // unconditional direct jump: BTB target, GHR unchanged
    BR_CALL = 2'd2,  // call: pushes the GHS, may zero or reload the GHR
    BR_RET  = 2'd3   // return: pops the GHS, may restore the GHR
  } br_type_e;

  // Run-time selection of the mechanisms.
  typedef struct packed {
    logic ghs_en;       // restore the GHR from the stack on a return
    logic zero_en;      // clear the GHR on a call
    logic btb_hist_en;  // reload the GHR on a call from the BTB old-history field
    logic retain_en;    // on restore keep the callee's RETAIN newest bits
  } ghs_cfg_t;

  // Configurations evaluated for the design (baseline is plain gshare).
  localparam ghs_cfg_t CFG_BASELINE   = '{ghs_en: 1'b0, zero_en: 1'b0, btb_hist_en: 1'b0, retain_en: 1'b0};
  localparam ghs_cfg_t CFG_GHS        = '{ghs_en: 1'b1, zero_en: 1'b1, btb_hist_en: 1'b0, retain_en: 1'b0};
  localparam ghs_cfg_t CFG_GHS_R6     = '{ghs_en: 1'b1, zero_en: 1'b1, btb_hist_en: 1'b0, retain_en: 1'b1};
  localparam ghs_cfg_t CFG_GHS_BTB    = '{ghs_en: 1'b1, zero_en: 1'b1, btb_hist_en: 1'b1, retain_en: 1'b0};
  localparam ghs_cfg_t CFG_GHS_BTB_R6 = '{ghs_en: 1'b1, zero_en: 1'b1, btb_hist_en: 1'b1, retain_en: 1'b1};

endpackage
