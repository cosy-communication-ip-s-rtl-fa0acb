// tb_upmc_fifo: self-checking test of the channel FIFO at its reference size
// (32 x 8). Random pushes and pops, including pushes into a full and pops from
// an empty FIFO, are compared item by item with a queue model; full, empty,
// count and free are checked every cycle. A directed phase fills the FIFO to
// its depth and checks that the ninth push is refused.
module tb_upmc_fifo;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, full, empty;
  logic [WIDTH-1:0] wdata, rdata;
  logic [CW-1:0] count, free;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];

  upmc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // compare state against the model just before each clock edge
  task automatic step(bit p, bit q, logic [WIDTH-1:0] d);
    push = p; pop = q; wdata = d;
    #1;
    check(count == CW'(model.size()), "count");
    check(free == CW'(DEPTH - model.size()), "free");
    check(full == (model.size() == DEPTH), "full");
    check(empty == (model.size() == 0), "empty");
    if (model.size() != 0) check(rdata == model[0], "head data");
    @(posedge clk);
    // apply the same rule to the model: both ops use the pre-edge state
    begin
      int sz = model.size();
      if (q && sz != 0) void'(model.pop_front());
      if (p && sz != DEPTH) model.push_back(d);
    end
    #1;
  endtask

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // directed: fill to depth, one more push must be refused
    for (int i = 0; i < DEPTH + 1; i++) step(1'b1, 1'b0, 32'hA000_0000 + i);
    check(full && count == CW'(DEPTH), "full after DEPTH pushes");
    // simultaneous push and pop while full: only the pop is taken
    step(1'b1, 1'b1, 32'hDEAD_BEEF);
    check(count == CW'(DEPTH - 1), "push refused while full, pop taken");
    for (int i = 0; i < DEPTH + 1; i++) step(1'b0, 1'b1, '0);
    check(empty, "empty after draining");
    // random traffic
    for (int i = 0; i < 2000; i++) step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
