// tb_flow_fifo: self-checking test of the flow-through FIFO used for every
// queue of the sub-system. A reference queue in the testbench is compared
// with the FIFO under random push/pop traffic, including push and pop on an
// empty FIFO (the word must pass straight through in the same cycle), a full
// FIFO, and the synchronous clear.
module tb_flow_fifo;
  localparam int W = 16, D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         clr, push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;

  flow_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .clr, .push, .din, .pop, .dout, .empty, .full, .count);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] q[$];
  int n_bypass = 0;

  initial begin
    clr = 0; push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // flow-through: push into empty FIFO is visible at once
    push = 1; din = 16'hA5A5; #1;
    check(!empty && dout == 16'hA5A5, "pushed word visible in the same cycle");
    pop = 1; #1;
    @(negedge clk); push = 0; pop = 0; #1;
    check(empty && count == 0, "push and pop on empty leaves it empty");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      push = ($urandom_range(3) != 0) && (q.size() < D || $urandom_range(1) == 0);
      din  = 16'($urandom);
      #1;
      pop  = !empty && $urandom_range(2) != 0;
      if (push && full && !pop) push = 0;
      if (push && full) push = 0;
      if (i == 1500) clr = 1; else clr = 0;
      #1;
      if (pop) begin
        if (q.size() == 0) begin
          n_bypass++;
          check(push && dout == din, "bypass word");
        end else
          check(dout == q[0], $sformatf("head %h exp %h", dout, q[0]));
      end
      check(32'(count) == q.size(), $sformatf("count %0d exp %0d", count, q.size()));
      check(full == (q.size() == D), "full flag");
      @(posedge clk);
      if (clr) q.delete();
      else begin
        if (push) q.push_back(din);
        if (pop) void'(q.pop_front());
      end
    end
    check(n_bypass > 0, "bypass exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200us; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
