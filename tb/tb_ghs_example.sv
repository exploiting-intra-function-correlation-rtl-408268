// tb_ghs_example: the worked example of the Global History Stack, replayed
// on the predictor with a 10-bit history register.
//
// Three functions: the caller calls at 0x12004CA4 with history 1000111101,
// so (0x12004CA8, 1000111101) is pushed; the function at 0x12005F48 runs
// branches that leave history 0100101110 and calls 0x12006684 from
// 0x12005F4C, pushing (0x12005F50, 0100101110); the innermost function has
// a taken bne at 0x12006688 and a not-taken beq at 0x1200669C, giving
// 0010111010, and returns from 0x120066A4. The return must be predicted to
// 0x12005F50 and the history must come back as 0100101110; the second
// return goes to 0x12004CA8 with 1000111101 restored. The example runs
// once with the history stack alone (no zeroing, as in the example) and
// once with zeroing, where the innermost function starts from 0 and ends
// at 0000000010.
module tb_ghs_example;
  import ghs_pkg::*;
  localparam int unsigned GB = 10;

  logic          clk = 1'b0;
  logic          rst_n;
  ghs_cfg_t      cfg;
  logic          ev_valid, ev_taken;
  logic [31:0]   ev_pc, ev_target, pred_target;
  br_type_e      ev_type;
  logic          pred_taken, pred_target_valid, mispredict;
  logic [GB-1:0] ghr;
  logic          ghs_restore_evt, btb_reload_evt, btb_save_evt, ras_overflow_evt, ras_underflow_evt;

  ghs_predictor #(.GHR_BITS(GB)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input br_type_e t, input logic [31:0] pc, input logic tk, input logic [31:0] tgt);
    ev_valid = 1'b1; ev_type = t; ev_pc = pc; ev_taken = tk; ev_target = tgt;
    @(posedge clk);
    #1 ev_valid = 1'b0;
  endtask

  task automatic check_ghr(input logic [GB-1:0] e, input string what);
    checks++;
    if (ghr != e) begin
      failures++;
      $display("%s: history %b, expected %b", what, ghr, e);
    end
  endtask

  // shift a whole history pattern in, oldest bit first, from branches at base
  task automatic load_history(input logic [GB-1:0] pat, input logic [31:0] base);
    for (int i = GB - 1; i >= 0; i--) issue(BR_COND, base + 32'(4 * (GB - 1 - i)), pat[i], base + 32'h40);
  endtask

  task automatic check_return(input logic [31:0] pc, input logic [31:0] to, input string what);
    ev_valid = 1'b1; ev_type = BR_RET; ev_pc = pc; ev_taken = 1'b1; ev_target = to;
    #1;
    checks++;
    if (!pred_target_valid || pred_target != to || mispredict || !ghs_restore_evt) begin
      failures++;
      $display("%s: predicted %h (valid %b), expected %h", what, pred_target, pred_target_valid, to);
    end
    @(posedge clk);
    #1 ev_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; cfg = '{ghs_en: 1'b1, zero_en: 1'b0, btb_hist_en: 1'b0, retain_en: 1'b0};
    ev_valid = 1'b0; ev_type = BR_COND; ev_pc = '0; ev_taken = 1'b0; ev_target = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int pass = 0; pass < 2; pass++) begin
      cfg.zero_en = (pass == 1);
      load_history(10'b1000111101, 32'h1200_4C00);
      check_ghr(10'b1000111101, "before call 1");
      issue(BR_CALL, 32'h1200_4CA4, 1'b1, 32'h1200_5F48);              // (1)
      load_history(10'b0100101110, 32'h1200_5E00);
      check_ghr(10'b0100101110, "before call 2");
      issue(BR_CALL, 32'h1200_5F4C, 1'b1, 32'h1200_6684);              // (2)
      check_ghr(pass == 1 ? 10'b0 : 10'b0100101110, "callee entry");
      issue(BR_COND, 32'h1200_6688, 1'b1, 32'h1200_6690);              // bne taken
      issue(BR_COND, 32'h1200_669C, 1'b0, 32'h1200_6680);              // beq not taken
      check_ghr(pass == 1 ? 10'b0000000010 : 10'b0010111010, "at return");
      check_return(32'h1200_66A4, 32'h1200_5F50, "return 1");         // (3)
      check_ghr(10'b0100101110, "after return 1");
      check_return(32'h1200_5F60, 32'h1200_4CA8, "return 2");
      check_ghr(10'b1000111101, "after return 2");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
