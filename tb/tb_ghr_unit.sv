// tb_ghr_unit: self-checking test of the global history register.
//
// Directed cases first: outcomes shift in at bit 0; a call zeroes the
// history with zeroing on, keeps it with everything off, and loads the BTB
// old-history value (or zero on a miss) with the BTB mode on; a return
// restores the stacked history, and with retaining on only the upper 6 of
// 8 bits are taken from the stack and the 2 newest callee outcomes stay.
// Then random events under random modes are compared with a reference
// model written from those rules.
module tb_ghr_unit;
  import ghs_pkg::*;
  localparam int unsigned GB = 8;

  logic          clk = 1'b0;
  logic          rst_n;
  ghs_cfg_t      cfg;
  logic          ev_valid, ev_taken, pop_valid, btb_hist_valid;
  br_type_e      ev_type;
  logic [GB-1:0] pop_ghr, btb_hist, ghr;

  int checks = 0, failures = 0;
  logic [GB-1:0] model;

  ghr_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input br_type_e t, input logic tk, input logic pv, input logic [GB-1:0] pg,
                      input logic bv, input logic [GB-1:0] bh);
    ev_valid = 1'b1; ev_type = t; ev_taken = tk;
    pop_valid = pv; pop_ghr = pg; btb_hist_valid = bv; btb_hist = bh;
    @(posedge clk);
    #1 ev_valid = 1'b0;
  endtask

  task automatic expect_ghr(input logic [GB-1:0] e, input string what);
    checks++;
    if (ghr !== e) begin
      failures++;
      $display("%s: ghr=%b expected %b", what, ghr, e);
    end
  endtask

  function automatic logic [GB-1:0] ref_next(input logic [GB-1:0] g, input ghs_cfg_t c,
      input br_type_e t, input logic tk, input logic pv, input logic [GB-1:0] pg,
      input logic bv, input logic [GB-1:0] bh);
    case (t)
      BR_COND: return (g << 1) | GB'(tk);
      BR_CALL: begin
        if (c.btb_hist_en) return bv ? bh : '0;
        if (c.zero_en) return '0;
        return g;
      end
      BR_RET: begin
        if (c.ghs_en && pv) return c.retain_en ? {pg[7:2], g[1:0]} : pg;
        return g;
      end
      default: return g;
    endcase
  endfunction

  initial begin
    rst_n = 1'b0; cfg = CFG_BASELINE; ev_valid = 1'b0; ev_type = BR_COND; ev_taken = 1'b0;
    pop_valid = 1'b0; pop_ghr = '0; btb_hist_valid = 1'b0; btb_hist = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_ghr(8'b0, "reset");

    // shift in 1,0,1,1
    step(BR_COND, 1, 0, 0, 0, 0); step(BR_COND, 0, 0, 0, 0, 0);
    step(BR_COND, 1, 0, 0, 0, 0); step(BR_COND, 1, 0, 0, 0, 0);
    expect_ghr(8'b0000_1011, "shift");
    // baseline: call and return leave it alone, jump too
    step(BR_CALL, 1, 0, 0, 1, 8'hAA); expect_ghr(8'b0000_1011, "baseline call");
    step(BR_RET, 1, 1, 8'h55, 0, 0);  expect_ghr(8'b0000_1011, "baseline return");
    step(BR_JUMP, 1, 0, 0, 0, 0);     expect_ghr(8'b0000_1011, "jump");
    // zeroing
    cfg = CFG_GHS;
    step(BR_CALL, 1, 0, 0, 1, 8'hAA); expect_ghr(8'b0, "zeroing");
    step(BR_COND, 1, 0, 0, 0, 0);
    step(BR_RET, 1, 1, 8'b1000_1111, 0, 0); expect_ghr(8'b1000_1111, "ghs restore");
    // restore with an empty stack keeps the history
    step(BR_RET, 1, 0, 8'h00, 0, 0); expect_ghr(8'b1000_1111, "empty stack");
    // retaining r6
    cfg = CFG_GHS_R6;
    step(BR_COND, 1, 0, 0, 0, 0); step(BR_COND, 0, 0, 0, 0, 0);   // ...10
    step(BR_RET, 1, 1, 8'b1011_0000, 0, 0); expect_ghr(8'b1011_0010, "retain");
    // BTB reload and miss
    cfg = CFG_GHS_BTB;
    step(BR_CALL, 1, 0, 0, 1, 8'h5A); expect_ghr(8'h5A, "btb reload");
    step(BR_CALL, 1, 0, 0, 0, 8'h5A); expect_ghr(8'h00, "btb miss");

    // random
    model = ghr;
    for (int k = 0; k < 20000; k++) begin
      br_type_e t;
      logic tk, pv, bv;
      logic [GB-1:0] pg, bh;
      if (k % 500 == 0) cfg = ghs_cfg_t'($urandom_range(15));
      t  = br_type_e'($urandom_range(3));
      tk = 1'($urandom); pv = 1'($urandom); bv = 1'($urandom);
      pg = GB'($urandom); bh = GB'($urandom);
      model = ref_next(model, cfg, t, tk, pv, pg, bv, bh);
      step(t, tk, pv, pg, bv, bh);
      expect_ghr(model, "random");
      if (failures > 20) break;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
