// tb_plb2cache: the request filter between a DCU-style PLB master (driven by
// tasks) and a cache model, with a PLB slave stub for private addresses.
//
// The cache model acknowledges a command in its second cycle (a hit) or,
// when slow mode is on, after a random delay; reads return a function of the
// address and writes are logged. Checked: a shared read is answered 3 cycles
// after the request with a 2-cycle cache, a shared write in 2 cycles; the
// cache sees every shared access once, in order, with the right address, data,
// byte enables and non-cacheable flag; private accesses go to the PLB only
// (the request is never seen by the PLB for shared addresses); when the cache
// is slow the FIFO fills and addrack is withheld, and nothing is lost; shared
// read data waits while the PLB is returning read data.
module tb_plb2cache;
  import ccs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dcu_m2s_t dcu_m, plb_m;
  dcu_s2m_t dcu_s, plb_s;
  logic read_cmd, write_cmd, non_cacheable, cache_ack;
  logic [31:0] address, data_in, data_out;
  logic [3:0] be_out;

  plb2cache dut (.clk, .rst_n, .dcu_m, .dcu_s, .plb_m, .plb_s, .read_cmd, .write_cmd, .non_cacheable,
                 .address, .data_in, .be_out, .cache_ack, .data_out);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // cache model
  bit slow = 0;
  int age = 0, wait_for = 1;
  typedef struct { bit w; bit nc; logic [31:0] a; logic [31:0] d; logic [3:0] be; } op_t;
  op_t seen[$];
  function automatic logic [31:0] fval(input logic [31:0] a); return a ^ 32'h5A5A_0000; endfunction
  always @(posedge clk) begin
    if (!rst_n) age <= 0;
    else if ((read_cmd || write_cmd) && !cache_ack) age <= age + 1;
    else begin
      age <= 0;
      if (cache_ack) seen.push_back('{write_cmd, non_cacheable, address, data_in, be_out});
      wait_for <= slow ? $urandom_range(1, 8) : 1;
    end
  end
  assign cache_ack = (read_cmd || write_cmd) && age >= wait_for;
  assign data_out  = fval(address);

  // PLB slave stub (private), can be forced to deliver read data
  logic pb, prnw, force_rd;
  int n_plb_shared = 0, n_plb = 0, n_held = 0;
  always_comb begin
    plb_s = '0;
    plb_s.addrack = plb_m.request && !pb;
    if (pb) begin plb_s.rddack = prnw; plb_s.wrdack = !prnw; plb_s.rddbus = {2{32'h0000_BEEF}}; end
    if (force_rd) begin plb_s.rddack = 1; plb_s.busy = 1; plb_s.rddbus = '1; end
  end
  always @(posedge clk) begin
    if (!rst_n) pb <= 0;
    else if (pb) pb <= 0;
    else if (plb_m.request) begin
      pb <= 1; prnw <= plb_m.rnw; n_plb++;
      if ((plb_m.abus & 32'hFF00_0000) == 32'h0100_0000) n_plb_shared++;
    end
    if (dut.acc_st == dut.ACC_RETURN && force_rd) n_held++;
  end

  task automatic dcu(input bit w, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q, output int lat);
    int t0;
    @(negedge clk);
    dcu_m.request = 1; dcu_m.rnw = !w; dcu_m.abus = a; dcu_m.be = a[2] ? 8'h0F : 8'hF0; dcu_m.wrdbus = {d, d};
    t0 = cyc;
    #1; while (!dcu_s.addrack) begin @(negedge clk); #1; end
    @(negedge clk); dcu_m.request = 0;
    #1; while (!(w ? dcu_s.wrdack : dcu_s.rddack)) begin @(negedge clk); #1; end
    q = a[2] ? dcu_s.rddbus[31:0] : dcu_s.rddbus[63:32];
    lat = cyc - t0 + 1;
  endtask

  initial begin
    logic [31:0] q;
    int lat;
    op_t exp[$];
    dcu_m = '0; force_rd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    dcu(0, 32'h0100_0104, 0, q, lat);
    check(q == fval(32'h0100_0104) && lat == 3, $sformatf("shared read hit: %h in %0d cycles (3 expected)", q, lat));
    exp.push_back('{0, 0, 32'h0100_0104, 0, 4'hF});
    dcu(1, 32'h0100_0200, 32'hDEAD_0001, q, lat);
    check(lat == 2, $sformatf("shared write in %0d cycles (2 expected)", lat));
    exp.push_back('{1, 0, 32'h0100_0200, 32'hDEAD_0001, 4'hF});
    dcu(1, 32'h01F0_0014, 32'hDEAD_0002, q, lat);
    exp.push_back('{1, 1, 32'h01F0_0014, 32'hDEAD_0002, 4'hF});
    dcu(0, 32'h0000_3000, 0, q, lat);
    check(q == 32'h0000_BEEF, "private read answered by the PLB");
    dcu(1, 32'h0000_3004, 32'h1, q, lat);

    // slow cache: a burst of writes fills the FIFO
    slow = 1;
    for (int i = 0; i < 40; i++) begin
      logic [31:0] a;
      bit w;
      a = 32'h0100_0000 | 32'(i * 4);
      w = (i % 3) != 0;
      dcu(w, a, 32'(i), q, lat);
      if (!w) check(q == fval(a), $sformatf("read %0d under load", i));
      exp.push_back('{w, 0, a, w ? 32'(i) : 0, 4'hF});
    end
    slow = 0;
    // shared read data waits while the PLB returns read data
    @(negedge clk);
    dcu_m.request = 1; dcu_m.rnw = 1; dcu_m.abus = 32'h0100_0300; dcu_m.be = 8'hF0;
    #1; check(dcu_s.addrack, "shared read accepted at once");
    @(negedge clk); dcu_m.request = 0; force_rd = 1;     // PLB read data in the cycle the shared data is due
    repeat (3) @(negedge clk);
    force_rd = 0; #1;
    check(dcu_s.rddack && dcu_s.rddbus[63:32] == fval(32'h0100_0300) && n_held > 0,
          "shared read data held back during PLB read data, delivered after");
    exp.push_back('{0, 0, 32'h0100_0300, 0, 4'hF});
    repeat (10) @(negedge clk);

    check(seen.size() == exp.size(), $sformatf("cache saw %0d accesses (%0d expected)", seen.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < seen.size(); i++) begin
      check(seen[i].w == exp[i].w && seen[i].a == exp[i].a && seen[i].nc == exp[i].nc &&
            (!exp[i].w || (seen[i].d == exp[i].d && seen[i].be == exp[i].be)),
            $sformatf("access %0d: w%0d %h %h nc%0d", i, seen[i].w, seen[i].a, seen[i].d, seen[i].nc));
    end
    check(n_plb == 2 && n_plb_shared == 0, $sformatf("only private accesses on the PLB (%0d, %0d shared)", n_plb, n_plb_shared));
    check(dut.f_count == 0 && !dcu_s.busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #50us; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
