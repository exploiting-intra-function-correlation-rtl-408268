// tb_ghs_predictor: end-to-end test of the GHS branch predictor at its
// default sizes (4K-entry gshare, 8 history bits, 10-entry stack, 512-entry
// BTB, retaining 2 bits).
//
// A small synthetic program drives the predictor: eight functions at fixed
// addresses, each a fixed sequence of conditional branches (biased, random
// or repeating the previous outcome), jumps and call sites; function 7 calls
// itself to a random depth of up to 13, which overflows the 10-entry stack
// and later underflows it. An interpreter with its own call stack walks the
// program and presents every control instruction, with its real outcome
// and target, to the predictor, with occasional idle cycles.
//
// The program runs in turn under the baseline, GHS, GHS+r6, GHS+BTB and
// GHS+BTB+r6 modes, switching the mode without a reset. A reference model
// of the whole predictor, written here from the mechanism rules, predicts
// every output (direction, target, mispredict flag, history register and
// the mechanism pulses) and the two are compared every cycle. Each
// mechanism - zeroing, stack restore, retaining, BTB reload, BTB save,
// stack overflow and underflow, mode switch - is counted and must occur.
module tb_ghs_predictor;
  import ghs_pkg::*;

  localparam int unsigned NPHT = 4096;
  localparam int unsigned NBTB = 512;
  localparam int unsigned D    = 10;
  localparam int unsigned GB   = 8;
  localparam int unsigned EVENTS_PER_MODE = 30000;

  logic          clk = 1'b0;
  logic          rst_n;
  ghs_cfg_t      cfg;
  logic          ev_valid, ev_taken;
  logic [31:0]   ev_pc, ev_target, pred_target;
  br_type_e      ev_type;
  logic          pred_taken, pred_target_valid, mispredict;
  logic [GB-1:0] ghr;
  logic          ghs_restore_evt, btb_reload_evt, btb_save_evt, ras_overflow_evt, ras_underflow_evt;

  ghs_predictor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // reference model
  // ------------------------------------------------------------------
  int            m_pht [NPHT];
  logic          b_v    [NBTB];
  logic [31:0]   b_pc   [NBTB];
  logic [31:0]   b_tgt  [NBTB];
  logic          b_call [NBTB];
  logic [GB-1:0] b_hist [NBTB];
  logic [31+GB:0] ras [$];
  logic [GB-1:0] m_ghr;

  function automatic int bi(input logic [31:0] pc); return int'(pc[10:2]); endfunction
  function automatic logic bhit(input logic [31:0] pc);
    return b_v[bi(pc)] && b_pc[bi(pc)][31:11] == pc[31:11];
  endfunction

  int n_zero, n_restore, n_retain, n_reload, n_save, n_ovf, n_udf, n_mis, n_cond, n_switch;
  int mis_per_mode [5];

  task automatic model_reset();
    for (int i = 0; i < NPHT; i++) m_pht[i] = 1;
    for (int i = 0; i < NBTB; i++) begin b_v[i] = 1'b0; b_hist[i] = '0; b_call[i] = 1'b0; end
    ras.delete();
    m_ghr = '0;
  endtask

  // present one instruction, compare, clock, advance the model
  task automatic issue(input br_type_e t, input logic [31:0] pc, input logic tk,
                       input logic [31:0] tgt, input int mode);
    int pidx;
    logic e_taken, e_tv, e_mis, e_restore, e_reload, e_save, e_ovf, e_udf, h;
    logic [31:0] e_tgt, cpc;
    logic [GB-1:0] nghr;

    ev_valid = 1'b1; ev_type = t; ev_pc = pc; ev_taken = tk; ev_target = tgt;
    #1;
    pidx = int'(pc[13:2]) ^ int'(m_ghr);
    h = bhit(pc);
    e_taken = (t == BR_COND) ? (m_pht[pidx] >= 2) : 1'b1;
    if (t == BR_RET) begin
      e_tv  = ras.size() != 0;
      e_tgt = e_tv ? ras[$][31+GB:GB] : '0;
    end else begin
      e_tv  = h;
      e_tgt = h ? b_tgt[bi(pc)] : '0;
    end
    e_mis = (e_taken != tk) || (tk && (!e_tv || e_tgt != tgt));
    e_restore = t == BR_RET && cfg.ghs_en && ras.size() != 0;
    e_reload  = t == BR_CALL && cfg.btb_hist_en && h && b_call[bi(pc)];
    cpc = tgt - 32'd4;
    e_save = t == BR_RET && cfg.btb_hist_en && bhit(cpc) && b_call[bi(cpc)];
    e_ovf = t == BR_CALL && ras.size() == D;
    e_udf = t == BR_RET && ras.size() == 0;

    checks++;
    if (pred_taken != e_taken || pred_target_valid != e_tv || (e_tv && pred_target != e_tgt) ||
        mispredict != e_mis || ghr != m_ghr || ghs_restore_evt != e_restore ||
        btb_reload_evt != e_reload || btb_save_evt != e_save ||
        ras_overflow_evt != e_ovf || ras_underflow_evt != e_udf) begin
      failures++;
      if (failures < 10)
        $display("t=%0t %s pc=%h: taken %b/%b tv %b/%b tgt %h/%h mis %b/%b ghr %b/%b rst %b/%b rld %b/%b sav %b/%b ovf %b/%b udf %b/%b",
                 $time, t.name(), pc, pred_taken, e_taken, pred_target_valid, e_tv, pred_target, e_tgt,
                 mispredict, e_mis, ghr, m_ghr, ghs_restore_evt, e_restore, btb_reload_evt, e_reload,
                 btb_save_evt, e_save, ras_overflow_evt, e_ovf, ras_underflow_evt, e_udf);
    end

    // statistics
    n_mis += int'(e_mis); mis_per_mode[mode] += int'(e_mis);
    n_restore += int'(e_restore); n_reload += int'(e_reload); n_save += int'(e_save);
    n_ovf += int'(e_ovf); n_udf += int'(e_udf);
    if (t == BR_COND) n_cond++;
    if (t == BR_CALL && !e_reload && (cfg.zero_en || cfg.btb_hist_en)) n_zero++;
    if (e_restore && cfg.retain_en) n_retain++;

    // next state
    nghr = m_ghr;
    case (t)
      BR_COND: nghr = {m_ghr[GB-2:0], tk};
      BR_CALL: if (cfg.btb_hist_en) nghr = e_reload ? b_hist[bi(pc)] : '0;
               else if (cfg.zero_en) nghr = '0;
      BR_RET:  if (e_restore) nghr = cfg.retain_en ? {ras[$][GB-1:2], m_ghr[1:0]} : ras[$][GB-1:0];
      default: ;
    endcase
    if (t == BR_COND) begin
      if (tk && m_pht[pidx] < 3) m_pht[pidx]++;
      if (!tk && m_pht[pidx] > 0) m_pht[pidx]--;
    end
    if (e_save) b_hist[bi(cpc)] = m_ghr;
    if ((t == BR_COND && tk) || t == BR_JUMP || t == BR_CALL) begin
      if (!h) b_hist[bi(pc)] = '0;
      b_v[bi(pc)] = 1'b1; b_pc[bi(pc)] = pc; b_tgt[bi(pc)] = tgt; b_call[bi(pc)] = (t == BR_CALL);
    end
    if (t == BR_RET && ras.size() != 0) void'(ras.pop_back());
    if (t == BR_CALL) begin
      if (ras.size() == D) void'(ras.pop_front());
      ras.push_back({pc + 32'd4, m_ghr});
    end

    @(posedge clk);
    #1;
    m_ghr = nghr;
    ev_valid = 1'b0;
    if ($urandom_range(99) < 5) begin   // idle cycle
      #1;
      checks++;
      if (mispredict || ghs_restore_evt || btb_save_evt || ras_overflow_evt || ras_underflow_evt) failures++;
      @(posedge clk);
      #1;
    end
  endtask

  // ------------------------------------------------------------------
  // synthetic program
  // ------------------------------------------------------------------
  typedef enum int {OP_COND_BIAS, OP_COND_RAND, OP_COND_COPY, OP_JUMP, OP_CALL, OP_SELF} op_e;
  localparam int NF = 8, NOPS = 8;
  op_e  op_kind [NF][NOPS];
  int   op_arg  [NF][NOPS];
  int   nops    [NF];

  function automatic logic [31:0] fbase(input int f); return 32'h1200_0000 + 32'(f) * 32'h1240; endfunction
  function automatic logic [31:0] opc(input int f, input int k); return fbase(f) + 32'(k) * 32'd12; endfunction

  task automatic build_program();
    for (int f = 0; f < NF; f++) begin
      nops[f] = (f == 7) ? 4 : $urandom_range(4, NOPS);
      for (int k = 0; k < NOPS; k++) begin
        int r;
        r = $urandom_range(99);
        op_arg[f][k] = $urandom_range(100);
        if (f == 7) op_kind[f][k] = (k == 2) ? OP_SELF : OP_COND_BIAS;
        else if (r < 30) op_kind[f][k] = OP_COND_BIAS;
        else if (r < 42) op_kind[f][k] = OP_COND_RAND;
        else if (r < 58) op_kind[f][k] = OP_COND_COPY;
        else if (r < 66) op_kind[f][k] = OP_JUMP;
        else if (f < NF - 1) begin
          op_kind[f][k] = OP_CALL;
          op_arg[f][k] = $urandom_range(f + 1, NF - 1);
        end else op_kind[f][k] = OP_COND_BIAS;
      end
    end
    // main always reaches the recursive function
    op_kind[0][0] = OP_CALL; op_arg[0][0] = 7;
  endtask

  int   fr_f [64], fr_k [64];
  logic [31:0] fr_ret [64];
  int   sp, rdepth, rlimit;
  logic last_out;

  task automatic run_program(input int nev, input int mode);
    int n;
    n = 0;
    sp = 0; fr_f[0] = 0; fr_k[0] = 0; last_out = 1'b0; rdepth = 0;
    while (n < nev) begin
      int f, k;
      f = fr_f[sp]; k = fr_k[sp];
      if (k >= nops[f]) begin
        if (sp == 0) begin
          issue(BR_JUMP, opc(0, nops[0]), 1'b1, fbase(0), mode);
          fr_k[0] = 0;
        end else begin
          issue(BR_RET, opc(f, nops[f]), 1'b1, fr_ret[sp], mode);
          if (f == 7 && fr_f[sp-1] == 7) rdepth--;
          sp--;
        end
        n++;
        continue;
      end
      fr_k[sp] = k + 1;
      case (op_kind[f][k])
        OP_COND_BIAS, OP_COND_RAND, OP_COND_COPY: begin
          logic o;
          if (op_kind[f][k] == OP_COND_BIAS) o = ($urandom_range(99) < op_arg[f][k]) ^ (op_arg[f][k] > 50 && k[0]);
          else if (op_kind[f][k] == OP_COND_RAND) o = 1'($urandom);
          else o = last_out;
          last_out = o;
          issue(BR_COND, opc(f, k), o, opc(f, k) + 32'd24, mode);
          n++;
        end
        OP_JUMP: begin
          issue(BR_JUMP, opc(f, k), 1'b1, opc(f, k) + 32'd12, mode);
          n++;
        end
        OP_CALL, OP_SELF: begin
          int g;
          g = (op_kind[f][k] == OP_SELF) ? 7 : op_arg[f][k];
          if (op_kind[f][k] == OP_SELF && rdepth >= rlimit) begin
            // recursion ends here: the site is skipped
          end else begin
            if (g == 7 && f != 7) begin
              rlimit = ($urandom_range(99) < 15) ? $urandom_range(9, 13) : $urandom_range(0, 3);
              rdepth = 0;
            end
            if (f == 7 && g == 7) rdepth++;
            issue(BR_CALL, opc(f, k), 1'b1, fbase(g), mode);
            sp++;
            fr_f[sp] = g; fr_k[sp] = 0; fr_ret[sp] = opc(f, k) + 32'd4;
            n++;
          end
        end
        default: ;
      endcase
    end
  endtask

  ghs_cfg_t modes [5];

  initial begin
    modes[0] = CFG_BASELINE; modes[1] = CFG_GHS; modes[2] = CFG_GHS_R6;
    modes[3] = CFG_GHS_BTB; modes[4] = CFG_GHS_BTB_R6;
    rst_n = 1'b0; cfg = CFG_BASELINE; ev_valid = 1'b0; ev_type = BR_COND; ev_pc = '0;
    ev_taken = 1'b0; ev_target = '0;
    n_zero = 0; n_restore = 0; n_retain = 0; n_reload = 0; n_save = 0; n_ovf = 0; n_udf = 0;
    n_mis = 0; n_cond = 0; n_switch = 0;
    for (int i = 0; i < 5; i++) mis_per_mode[i] = 0;
    model_reset();
    build_program();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // a return with nothing on the stack
    issue(BR_RET, 32'h1100_0000, 1'b1, 32'h1100_0100, 0);

    for (int m = 0; m < 5; m++) begin
      if (m != 0) n_switch++;
      cfg = modes[m];
      run_program(EVENTS_PER_MODE, m);
      if (failures > 20) break;
    end

    $display("conditional branches %0d, mispredictions %0d (baseline %0d, GHS %0d, GHS+r6 %0d, GHS+BTB %0d, GHS+BTB+r6 %0d)",
             n_cond, n_mis, mis_per_mode[0], mis_per_mode[1], mis_per_mode[2], mis_per_mode[3], mis_per_mode[4]);
    $display("zeroing %0d, stack restores %0d (retaining %0d), BTB reloads %0d, BTB saves %0d, overflows %0d, underflows %0d, mode switches %0d",
             n_zero, n_restore, n_retain, n_reload, n_save, n_ovf, n_udf, n_switch);
    checks++; if (n_zero == 0)    begin failures++; $display("zeroing never happened"); end
    checks++; if (n_restore == 0) begin failures++; $display("stack restore never happened"); end
    checks++; if (n_retain == 0)  begin failures++; $display("retaining never happened"); end
    checks++; if (n_reload == 0)  begin failures++; $display("BTB reload never happened"); end
    checks++; if (n_save == 0)    begin failures++; $display("BTB save never happened"); end
    checks++; if (n_ovf == 0)     begin failures++; $display("stack overflow never happened"); end
    checks++; if (n_udf == 0)     begin failures++; $display("stack underflow never happened"); end
    checks++; if (n_mis == 0)     begin failures++; $display("no misprediction"); end
    checks++; if (n_switch != 4)  begin failures++; $display("mode switches missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
