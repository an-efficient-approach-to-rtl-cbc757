// tb_sync_fifo: self-checking test of sync_fifo against a queue model.
// Random pushes and pops (never pushing when full nor popping when empty)
// are compared entry by entry with a SystemVerilog queue, and the empty,
// full and count outputs are checked every cycle. It also checks that data
// fall through: the head is visible on dout the cycle after the first push.
module tb_sync_fifo;
  localparam int W = 8;
  localparam int D = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         push = 1'b0, pop = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic         empty, full;
  logic [$clog2(D+1)-1:0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // single push: head falls through
    push = 1'b1; din = 8'hA5;
    @(negedge clk);
    push = 1'b0;
    model.push_back(8'hA5);
    check(!empty && dout == 8'hA5 && count == 1, "fall-through head");
    for (int i = 0; i < 1000; i++) begin
      bit p, q;
      p = ($urandom % 2 == 0) && (model.size() < D);
      q = ($urandom % 2 == 0) && (model.size() > 0);
      push = p; pop = q; din = W'($urandom);
      if (q) check(dout == model[0], $sformatf("head %0h expected %0h", dout, model[0]));
      @(negedge clk);
      if (q) void'(model.pop_front());
      if (p) model.push_back(din);
      push = 1'b0; pop = 1'b0;
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
