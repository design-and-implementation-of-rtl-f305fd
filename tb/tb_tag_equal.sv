// tb_tag_equal: exhaustive-by-bit and random test of the tag comparator: equal
// tags must match; any single-bit difference and random different tags must not.
module tb_tag_equal;
  localparam int W = 21;
  logic [W-1:0] a, b;
  logic eq;
  tag_equal #(.W(W)) dut (.a, .b, .eq);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = W'($urandom); b = a; #1;
      check(eq == 1'b1, $sformatf("equal tags %h", a));
      for (int k = 0; k < W; k++) begin
        b = a ^ (W'(1) << k); #1;
        check(eq == 1'b0, $sformatf("tags %h %h differ in bit %0d", a, b, k));
      end
      b = W'($urandom); #1;
      check(eq == (a == b), "random pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100us; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
