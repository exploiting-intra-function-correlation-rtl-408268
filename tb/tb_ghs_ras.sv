// tb_ghs_ras: self-checking test of the return address stack with history
// field.
//
// Directed: the pushes of the design's worked example, (0x12004CA8,
// 1000111101) then (0x12005F50, 0100101110) with a 10-bit history, pop in
// reverse order. Then pushing 12 entries onto the 10-entry stack must flag
// overflow twice and pop the 10 newest; popping an empty stack must flag
// underflow. Random push/pop traffic is then compared every cycle with a
// queue model that drops its oldest element when full.
module tb_ghs_ras;
  localparam int unsigned D  = 10;
  localparam int unsigned GB = 10;

  logic          clk = 1'b0;
  logic          rst_n, push, pop, top_valid, overflow, underflow;
  logic [31:0]   push_addr, top_addr;
  logic [GB-1:0] push_ghr, top_ghr;

  int checks = 0, failures = 0;
  logic [31+GB:0] q [$];

  ghs_ras #(.DEPTH(D), .GHR_BITS(GB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (top_valid != (q.size() != 0) ||
        (q.size() != 0 && {top_addr, top_ghr} != q[$])) begin
      failures++;
      if (failures < 10)
        $display("%s: top valid=%b %h/%b, model size %0d %h", what, top_valid, top_addr, top_ghr,
                 q.size(), (q.size() != 0) ? q[$] : '0);
    end
  endtask

  // one cycle: drive, check flags against the model, clock, update model
  task automatic cyc(input logic pu, input logic [31:0] a, input logic [GB-1:0] g, input logic po);
    logic exp_ovf, exp_udf;
    push = pu; push_addr = a; push_ghr = g; pop = po;
    #1;
    exp_ovf = pu && !po && q.size() == D;
    exp_udf = po && q.size() == 0;
    checks++;
    if (overflow != exp_ovf || underflow != exp_udf) begin
      failures++;
      $display("flags ovf=%b/%b udf=%b/%b", overflow, exp_ovf, underflow, exp_udf);
    end
    @(posedge clk);
    #1;
    push = 1'b0; pop = 1'b0;
    if (po && q.size() != 0) void'(q.pop_back());
    if (pu) begin
      if (q.size() == D) void'(q.pop_front());
      q.push_back({a, g});
    end
  endtask


  initial begin
    rst_n = 1'b0; push = 1'b0; pop = 1'b0; push_addr = '0; push_ghr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare("reset");

    cyc(1, 32'h1200_4CA8, 10'b1000111101, 0); compare("push 1");
    cyc(1, 32'h1200_5F50, 10'b0100101110, 0); compare("push 2");
    checks++; if (top_addr != 32'h1200_5F50 || top_ghr != 10'b0100101110) failures++;
    cyc(0, 0, 0, 1); compare("pop 2");
    checks++; if (top_addr != 32'h1200_4CA8 || top_ghr != 10'b1000111101) failures++;
    cyc(0, 0, 0, 1); compare("pop 1");
    checks++; if (top_valid) failures++;

    // overflow: 12 pushes
    for (int k = 0; k < 12; k++) begin
      cyc(1, 32'h1000 + 32'(k * 4), GB'(k), 0);
      compare("fill");
    end
    for (int k = 0; k < D; k++) begin
      checks++;
      if (top_addr != 32'h1000 + 32'((11 - k) * 4)) failures++;
      cyc(0, 0, 0, 1); compare("drain");
    end
    checks++; if (top_valid) failures++;
    push = 1'b0; pop = 1'b1; #1;
    checks++; if (!underflow) failures++;
    cyc(0, 0, 0, 1); compare("underflow");

    // random
    for (int k = 0; k < 20000; k++) begin
      logic pu, po;
      pu = ($urandom_range(99) < 50);
      po = ($urandom_range(99) < 45);
      cyc(pu, $urandom, GB'($urandom), po);
      compare("random");
      if (failures > 20) break;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
