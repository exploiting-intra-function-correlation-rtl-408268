// tb_btb_hist: self-checking test of the BTB with call bit and old-history
// field.
//
// A reference model keeps, per index (PC bits 10:2), the valid bit, the full
// PC of the owner, target, call bit and old history. Directed cases: an empty
// BTB misses; an allocated call hits with history 0; a history write through
// the return address minus 4 is read back by the next lookup of the call;
// a history write for a PC that does not own the entry is dropped; a conflicting
// allocation evicts the call and clears the history. Random allocations,
// history writes and lookups over a small PC set that forces conflicts are
// then compared with the model each cycle.
module tb_btb_hist;
  localparam int unsigned E  = 512;
  localparam int unsigned GB = 8;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [31:0]   lk_pc, lk_target, upd_pc, upd_target, hw_pc;
  logic          lk_hit, lk_call, upd_valid, upd_call, hw_valid, hw_done;
  logic [GB-1:0] lk_hist, hw_hist;

  int checks = 0, failures = 0;

  logic          m_v    [E];
  logic [31:0]   m_pc   [E];
  logic [31:0]   m_tgt  [E];
  logic          m_call [E];
  logic [GB-1:0] m_hist [E];

  btb_hist dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ix(input logic [31:0] pc);
    return int'(pc[10:2]);
  endfunction

  task automatic look(input logic [31:0] pc, input string what);
    logic h;
    int i;
    lk_pc = pc;
    #1;
    i = ix(pc);
    h = m_v[i] && (m_pc[i][31:11] == pc[31:11]);
    checks++;
    if (lk_hit != h || (h && (lk_target != m_tgt[i] || lk_call != m_call[i])) ||
        (h && m_call[i] && lk_hist != m_hist[i])) begin
      failures++;
      if (failures < 10)
        $display("%s pc=%h hit=%b/%b tgt=%h/%h call=%b/%b hist=%h/%h", what, pc, lk_hit, h,
                 lk_target, m_tgt[i], lk_call, m_call[i], lk_hist, m_hist[i]);
    end
  endtask

  // one cycle with optional allocation and history write
  task automatic cyc(input logic uv, input logic [31:0] up, input logic [31:0] ut, input logic uc,
                     input logic hv, input logic [31:0] hp, input logic [GB-1:0] hh);
    logic same, hmatch, exp_done;
    int ui, hi;
    upd_valid = uv; upd_pc = up; upd_target = ut; upd_call = uc;
    hw_valid = hv; hw_pc = hp; hw_hist = hh;
    #1;
    ui = ix(up); hi = ix(hp);
    same   = m_v[ui] && m_pc[ui][31:11] == up[31:11];
    hmatch = m_v[hi] && m_call[hi] && m_pc[hi][31:11] == hp[31:11];
    exp_done = hv && hmatch && !(uv && ui == hi && !same);
    checks++;
    if (hw_done != exp_done) begin
      failures++;
      $display("hw_done=%b expected %b", hw_done, exp_done);
    end
    @(posedge clk);
    #1;
    upd_valid = 1'b0; hw_valid = 1'b0;
    if (exp_done) m_hist[hi] = hh;
    if (uv) begin
      if (!same) m_hist[ui] = '0;
      m_v[ui] = 1'b1; m_pc[ui] = up; m_tgt[ui] = ut; m_call[ui] = uc;
    end
  endtask

  logic [31:0] pcs [12];

  initial begin
    rst_n = 1'b0; lk_pc = '0; upd_valid = 1'b0; upd_pc = '0; upd_target = '0; upd_call = 1'b0;
    hw_valid = 1'b0; hw_pc = '0; hw_hist = '0;
    for (int i = 0; i < E; i++) begin m_v[i] = 1'b0; m_hist[i] = '0; m_call[i] = 1'b0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    look(32'h1200_4CA4, "empty");
    checks++; if (lk_hit) failures++;
    cyc(1, 32'h1200_4CA4, 32'h1200_5F48, 1, 0, 0, 0);
    look(32'h1200_4CA4, "call alloc");
    checks++; if (!lk_hit || !lk_call || lk_hist != 0 || lk_target != 32'h1200_5F48) failures++;
    // return to 0x12004CA8 writes the history into the call's entry
    cyc(0, 0, 0, 0, 1, 32'h1200_4CA8 - 4, 8'b1011_0110);
    look(32'h1200_4CA4, "hist write");
    checks++; if (lk_hist != 8'b1011_0110) failures++;
    // wrong owner (same index, other tag): dropped
    cyc(0, 0, 0, 0, 1, 32'h1300_4CA4, 8'hFF);
    look(32'h1200_4CA4, "foreign write");
    checks++; if (lk_hist != 8'b1011_0110) failures++;
    // conflicting allocation evicts the call and clears the field
    cyc(1, 32'h1300_4CA4, 32'h1300_0000, 0, 0, 0, 0);
    look(32'h1200_4CA4, "evicted");
    checks++; if (lk_hit) failures++;
    cyc(1, 32'h1200_4CA4, 32'h1200_5F48, 1, 0, 0, 0);
    look(32'h1200_4CA4, "realloc");
    checks++; if (lk_hist != 0) failures++;

    // random over a PC set with index conflicts
    for (int k = 0; k < 12; k++)
      pcs[k] = {4'h1, 7'($urandom_range(2)), 10'($urandom), 9'($urandom_range(3)), 2'b00};
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] p, h;
      p = pcs[$urandom_range(11)];
      h = pcs[$urandom_range(11)];
      cyc(($urandom_range(99) < 40), p, $urandom, 1'($urandom),
          ($urandom_range(99) < 40), h, GB'($urandom));
      look(pcs[$urandom_range(11)], "random");
      if (failures > 20) break;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
