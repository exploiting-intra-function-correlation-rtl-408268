// tb_ghs_correlation: three small programs with the correlation patterns the
// mechanisms target, each run under all five modes from reset, comparing how
// often the direction of one chosen branch is mispredicted.
//
//   caller loop  : a 4-iteration loop whose body calls a function with 8
//                  random branches. Without the stack the loop branch sees
//                  the callee's random history; with it the loop's own
//                  history comes back after each return. Check: GHS has
//                  fewer than half the loop-branch mispredictions of the
//                  baseline.
//   invocations  : a function whose first branch alternates from one call
//                  to the next, called from one site after 6 random caller
//                  branches. With zeroing every call starts from history 0
//                  and the alternation is hidden; with the BTB history the
//                  call starts from the history the previous call ended
//                  with. Check: GHS+BTB has fewer than half the
//                  mispredictions of GHS on that branch. The function sits
//                  where its table entries do not alias with the caller's.
//   return value : a callee whose last branch is random (its "return
//                  value"), and a caller branch after the return with the
//                  same outcome. Restoring the whole history hides it;
//                  retaining the callee's 2 newest bits keeps it. Check:
//                  GHS+r6 has fewer than half the mispredictions of GHS.
// The predictor is instantiated with its default sizes.
module tb_ghs_correlation;
  import ghs_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n;
  ghs_cfg_t      cfg;
  logic          ev_valid, ev_taken;
  logic [31:0]   ev_pc, ev_target, pred_target;
  br_type_e      ev_type;
  logic          pred_taken, pred_target_valid, mispredict;
  logic [7:0]    ghr;
  logic          ghs_restore_evt, btb_reload_evt, btb_save_evt, ras_overflow_evt, ras_underflow_evt;

  ghs_predictor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int ITER = 2000;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] watch_pc;
  int          watch_mis;

  task automatic issue(input br_type_e t, input logic [31:0] pc, input logic tk, input logic [31:0] tgt);
    ev_valid = 1'b1; ev_type = t; ev_pc = pc; ev_taken = tk; ev_target = tgt;
    #1;
    if (pc == watch_pc && pred_taken != tk) watch_mis++;
    @(posedge clk);
    #1 ev_valid = 1'b0;
  endtask

  task automatic restart(input ghs_cfg_t c, input logic [31:0] wpc);
    rst_n = 1'b0; cfg = c; watch_pc = wpc; watch_mis = 0;
    @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  task automatic caller_loop();
    for (int n = 0; n < ITER; n++)
      for (int i = 0; i < 4; i++) begin
        issue(BR_CALL, 32'h1201_0010, 1'b1, 32'h1202_0000);
        for (int k = 0; k < 8; k++)
          issue(BR_COND, 32'h1202_0000 + 32'(4 * k), 1'($urandom), 32'h1202_0008 + 32'(4 * k));
        issue(BR_RET, 32'h1202_0040, 1'b1, 32'h1201_0014);
        issue(BR_COND, 32'h1201_0020, i < 3, 32'h1201_0010);
      end
  endtask

  task automatic invocations();
    logic alt;
    alt = 1'b0;
    for (int n = 0; n < ITER; n++) begin
      for (int k = 0; k < 6; k++)
        issue(BR_COND, 32'h1203_0000 + 32'(4 * k), 1'($urandom), 32'h1203_0008 + 32'(4 * k));
      issue(BR_CALL, 32'h1203_0020, 1'b1, 32'h1204_0800);
      alt = !alt;
      issue(BR_COND, 32'h1204_0800, alt, 32'h1204_0804);
      issue(BR_COND, 32'h1204_0804, 1'b1, 32'h1204_0808);
      issue(BR_RET, 32'h1204_0808, 1'b1, 32'h1203_0024);
      issue(BR_JUMP, 32'h1203_0028, 1'b1, 32'h1203_0000);
    end
  endtask

  task automatic return_value();
    logic v;
    for (int n = 0; n < ITER; n++) begin
      for (int k = 0; k < 8; k++)
        issue(BR_COND, 32'h1205_0000 + 32'(4 * k), 1'b1, 32'h1205_0004 + 32'(4 * k));
      issue(BR_CALL, 32'h1205_0020, 1'b1, 32'h1206_0000);
      for (int k = 0; k < 4; k++)
        issue(BR_COND, 32'h1206_0000 + 32'(4 * k), 1'b1, 32'h1206_0004 + 32'(4 * k));
      v = 1'($urandom);
      issue(BR_COND, 32'h1206_0010, v, 32'h1206_0014);
      issue(BR_RET, 32'h1206_0014, 1'b1, 32'h1205_0024);
      issue(BR_COND, 32'h1205_0028, v, 32'h1205_0030);
      issue(BR_JUMP, 32'h1205_0030, 1'b1, 32'h1205_0000);
    end
  endtask

  ghs_cfg_t modes [5];
  string    names [5];
  int       mis_a [5], mis_b [5], mis_c [5];

  task automatic expect_better(input string what, input int better, input int worse);
    checks++;
    if (!(better * 2 < worse)) begin
      failures++;
      $display("%s: expected clearly fewer mispredictions, got %0d against %0d", what, better, worse);
    end
  endtask

  initial begin
    modes[0] = CFG_BASELINE; modes[1] = CFG_GHS; modes[2] = CFG_GHS_R6;
    modes[3] = CFG_GHS_BTB; modes[4] = CFG_GHS_BTB_R6;
    names[0] = "baseline"; names[1] = "GHS"; names[2] = "GHS+r6"; names[3] = "GHS+BTB"; names[4] = "GHS+BTB+r6";
    ev_valid = 1'b0; ev_type = BR_COND; ev_pc = '0; ev_taken = 1'b0; ev_target = '0;
    rst_n = 1'b0; cfg = CFG_BASELINE; watch_pc = '0; watch_mis = 0;
    repeat (2) @(posedge clk);

    for (int m = 0; m < 5; m++) begin
      restart(modes[m], 32'h1201_0020); caller_loop();  mis_a[m] = watch_mis;
      restart(modes[m], 32'h1204_0800); invocations();  mis_b[m] = watch_mis;
      restart(modes[m], 32'h1205_0028); return_value(); mis_c[m] = watch_mis;
      $display("%-11s loop branch %5d of %0d, alternating branch %5d of %0d, return-value branch %5d of %0d",
               names[m], mis_a[m], 4 * ITER, mis_b[m], ITER, mis_c[m], ITER);
    end

    expect_better("caller loop, GHS vs baseline", mis_a[1], mis_a[0]);
    expect_better("invocations, GHS+BTB vs GHS", mis_b[3], mis_b[1]);
    expect_better("return value, GHS+r6 vs GHS", mis_c[2], mis_c[1]);
    expect_better("return value, GHS+BTB+r6 vs GHS+BTB", mis_c[4], mis_c[3]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
