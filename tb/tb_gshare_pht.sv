// tb_gshare_pht: self-checking test of the gshare pattern history table.
//
// A reference model in the testbench keeps its own array of 2-bit counters
// and computes the index as (PC / 4) mod 4096 with the 8 history bits XORed
// into the low bits. After reset every lookup must predict not-taken; then
// random updates over a small set of branch addresses and histories train
// the table, and every cycle the lookup of a random (PC, history) pair is
// compared with the model, both the index and the predicted direction. A
// directed sequence checks counter saturation at both ends.
module tb_gshare_pht;
  localparam int unsigned N  = 4096;
  localparam int unsigned GB = 8;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] lk_pc, upd_pc;
  logic [GB-1:0] lk_ghr, upd_ghr;
  logic        lk_taken, upd_valid, upd_taken;
  logic [11:0] lk_idx;

  int checks = 0, failures = 0;
  logic [1:0] model [N];

  gshare_pht dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_idx(input logic [31:0] pc, input logic [GB-1:0] g);
    return int'((pc >> 2) % N) ^ int'(g);
  endfunction

  task automatic check_lookup(input logic [31:0] pc, input logic [GB-1:0] g);
    int i;
    lk_pc = pc; lk_ghr = g;
    #1;
    i = ref_idx(pc, g);
    checks++;
    if (int'(lk_idx) != i || lk_taken != model[i][1]) begin
      failures++;
      if (failures < 10)
        $display("mismatch pc=%h ghr=%b idx=%0d/%0d taken=%b/%b", pc, g, lk_idx, i, lk_taken, model[i][1]);
    end
  endtask

  task automatic train(input logic [31:0] pc, input logic [GB-1:0] g, input logic t);
    int i;
    upd_valid = 1'b1; upd_pc = pc; upd_ghr = g; upd_taken = t;
    i = ref_idx(pc, g);
    @(posedge clk);
    #1;
    upd_valid = 1'b0;
    if (t && model[i] != 2'b11) model[i] = model[i] + 2'd1;
    else if (!t && model[i] != 2'b00) model[i] = model[i] - 2'd1;
  endtask

  logic [31:0] pcs [8];

  initial begin
    rst_n = 1'b0; upd_valid = 1'b0; upd_pc = '0; upd_ghr = '0; upd_taken = 1'b0;
    lk_pc = '0; lk_ghr = '0;
    for (int i = 0; i < N; i++) model[i] = 2'b01;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // after reset: weakly not-taken everywhere
    for (int k = 0; k < 64; k++) check_lookup($urandom, GB'($urandom));

    // saturation: four taken updates, then prediction taken; then five not taken
    for (int k = 0; k < 4; k++) train(32'h1200_4CA4, 8'h3d, 1'b1);
    check_lookup(32'h1200_4CA4, 8'h3d);
    checks++; if (!lk_taken) failures++;
    train(32'h1200_4CA4, 8'h3d, 1'b0);
    check_lookup(32'h1200_4CA4, 8'h3d);
    checks++; if (!lk_taken) failures++;   // 3 -> 2 still taken
    for (int k = 0; k < 4; k++) train(32'h1200_4CA4, 8'h3d, 1'b0);
    check_lookup(32'h1200_4CA4, 8'h3d);
    checks++; if (lk_taken) failures++;
    train(32'h1200_4CA4, 8'h3d, 1'b1);
    check_lookup(32'h1200_4CA4, 8'h3d);
    checks++; if (lk_taken) failures++;    // 0 -> 1 still not taken

    // same PC, different history: a different counter
    check_lookup(32'h1200_4CA4, 8'h3c);
    checks++; if (int'(lk_idx) == ref_idx(32'h1200_4CA4, 8'h3d)) failures++;

    // random training with biased branches
    for (int k = 0; k < 8; k++) pcs[k] = {$urandom} & 32'hFFFF_FFFC;
    for (int k = 0; k < 20000; k++) begin
      int b;
      logic [GB-1:0] g;
      b = $urandom_range(7);
      g = GB'($urandom_range(15));
      train(pcs[b], g, ($urandom_range(99) < (b * 12)));
      check_lookup(pcs[$urandom_range(7)], GB'($urandom_range(15)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
