// tb_ras: self-checking test of the return address stack.
// A queue models the stack with the same capacity: a push on a full stack
// drops the oldest entry. Random pushes and pops (and push+pop pairs) are
// compared against the model's top and emptiness; the test also overflows
// the stack on purpose and checks that the most recent DEPTH addresses
// come back in reverse order.
module tb_ras;
  localparam int unsigned DEPTH = 8, W = 16;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] push_addr = 0, top;
  logic valid;
  int checks = 0, failures = 0;

  ras #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [W-1:0] model[$];

  task automatic step(bit pu, bit po, logic [W-1:0] a);
    push = pu; pop = po; push_addr = a;
    @(posedge clk);
    if (pu && po) begin
      if (model.size() > 0) void'(model.pop_back());
      model.push_back(a);
    end else if (pu) begin
      model.push_back(a);
      if (model.size() > DEPTH) void'(model.pop_front());
    end else if (po) begin
      if (model.size() > 0) void'(model.pop_back());
    end
    #1;
    push = 0; pop = 0;
    check(valid == (model.size() > 0), "valid");
    if (model.size() > 0) check(top == model[$], "top");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1 check(!valid, "empty after reset");
    // overflow: push 2*DEPTH addresses, then pop DEPTH of them
    for (int i = 0; i < 2 * DEPTH; i++) step(1, 0, W'(100 + i));
    for (int i = 0; i < DEPTH; i++) begin
      check(top == W'(100 + 2 * DEPTH - 1 - i), "overflow keeps newest");
      step(0, 1, 0);
    end
    check(!valid, "empty after draining");
    // random traffic, popping only a non-empty model
    for (int i = 0; i < 1000; i++) begin
      int r;
      r = $urandom % 10;
      if (r < 4)                             step(1, 0, W'($urandom));
      else if (r < 8 && model.size() > 0)    step(0, 1, 0);
      else if (r == 8 && model.size() > 0)   step(1, 1, W'($urandom));
      else                                   step(0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
