// ghs_ras: return address stack extended with a history field, the Global
// History Stack (GHS).
//
// Each entry holds a return address and the global history that was current
// when the call executed. A call pushes both into the next free entry; a
// return pops the top entry, which gives the predicted return target and the
// history to restore. The top entry is read combinationally, so the popped
// values are available in the cycle the return is presented.
//
// The stack is a circular buffer of DEPTH entries with a top pointer and an
// occupancy count. Pushing onto a full stack overwrites the oldest entry
// (the count stays at DEPTH, overflow pulses); popping an empty stack does
// nothing and top_valid is low (underflow pulses). Both policies, and push
// with pop in one cycle replacing the top entry, are this design's choices.
//
// Interface and timing: push/pop take effect at the rising clock edge;
// top_* show the current top before that edge. Active-low synchronous reset
// empties the stack.
module ghs_ras #(
  parameter int unsigned DEPTH    = 10,
  parameter int unsigned GHR_BITS = 8,
  parameter int unsigned PC_BITS  = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                push,
  input  logic [PC_BITS-1:0]  push_addr,
  input  logic [GHR_BITS-1:0] push_ghr,
  input  logic                pop,
  output logic                top_valid,
  output logic [PC_BITS-1:0]  top_addr,
  output logic [GHR_BITS-1:0] top_ghr,
  output logic                overflow,
  output logic                underflow
);

  localparam int unsigned PTR_BITS = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_BITS = $clog2(DEPTH + 1);

  typedef struct packed {
    logic [PC_BITS-1:0]  addr;
    logic [GHR_BITS-1:0] ghr;
  } entry_t;

  entry_t               mem [DEPTH];
  logic [PTR_BITS-1:0]  top;     // index of the top entry when cnt > 0
  logic [CNT_BITS-1:0]  cnt;

  function automatic logic [PTR_BITS-1:0] inc(input logic [PTR_BITS-1:0] p);
    return (p == PTR_BITS'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [PTR_BITS-1:0] dec(input logic [PTR_BITS-1:0] p);
    return (p == '0) ? PTR_BITS'(DEPTH - 1) : p - 1'b1;
  endfunction

  logic do_pop;

  always_comb begin
    top_valid = (cnt != '0);
    top_addr  = top_valid ? mem[top].addr : '0;
    top_ghr   = top_valid ? mem[top].ghr  : '0;
    do_pop    = pop && top_valid;
    overflow  = push && !pop && (cnt == CNT_BITS'(DEPTH));
    underflow = pop && !top_valid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      top <= '0;
      cnt <= '0;
    end else if (push && do_pop) begin
      mem[top] <= '{addr: push_addr, ghr: push_ghr};
    end else if (push) begin
      mem[(cnt == '0) ? top : inc(top)] <= '{addr: push_addr, ghr: push_ghr};
      if (cnt != '0) top <= inc(top);
      if (cnt != CNT_BITS'(DEPTH)) cnt <= cnt + 1'b1;
    end else if (do_pop) begin
      if (cnt != CNT_BITS'(1)) top <= dec(top);
      cnt <= cnt - 1'b1;
    end
  end

endmodule
