// tb_workloads: the three kinds of shared-memory program the sub-system was
// built for, run at small sizes on the full design at its default parameters
// (two processors, 4 KB caches).
//
// Each processor is a task-driven DCU master (same PLB-style handshakes as
// the end-to-end testbench) executing the program's loads and stores one at a
// time; all program data lives in the shared, cacheable window.
//   1. Shared counter: each processor adds 1 to one shared word ITER times,
//      inside a Peterson lock (flag per processor plus a turn word). The
//      final value must be 2*ITER, which only holds if stores are seen in
//      order by the other processor and the lock really excludes.
//   2. Producer-consumer: processor 0 writes PC_WORDS values into a ring of
//      RING words and advances a head index; processor 1 waits for data,
//      reads and checks each value, and advances a tail index.
//   3. Merge sort: processor 0 writes SORT_N pseudo-random words; each
//      processor sorts its half by bottom-up merge passes between the array
//      and a scratch area; then processor 0 merges the halves into the
//      output area, which is compared with a reference sort.
// The lock, indices and done flags are ordinary shared words: all
// synchronisation is by spinning on cached copies, so it relies on the
// coherence protocol (invalidations, remote hits, write-backs).
// The sizes are this testbench's choice (far below the original programs'
// millions of iterations or words, which are too long to simulate); the
// cycle count of each workload is printed.
module tb_workloads;
  import ccs_pkg::*;

  localparam int NCPU     = 2;
  localparam int ITER     = 200000;
  localparam int RING     = 16;
  localparam int PC_WORDS = 1000;
  localparam int SORT_N   = 8192;
  localparam logic [31:0] SH      = 32'h0100_0000;
  localparam logic [31:0] FLAG0   = SH + 32'h0000;    // Peterson flags and turn
  localparam logic [31:0] FLAG1   = SH + 32'h0004;
  localparam logic [31:0] TURN    = SH + 32'h0008;
  localparam logic [31:0] COUNTER = SH + 32'h0040;
  localparam logic [31:0] HEAD    = SH + 32'h0080;    // producer-consumer indices
  localparam logic [31:0] TAIL    = SH + 32'h00C0;
  localparam logic [31:0] DONE1   = SH + 32'h0100;    // merge sort: processor 1 done
  localparam logic [31:0] RINGA   = SH + 32'h0400;
  localparam logic [31:0] ARR     = SH + 32'h1_0000;
  localparam logic [31:0] TMP     = SH + 32'h2_0000;
  localparam logic [31:0] OUTA    = SH + 32'h3_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dcu_m2s_t  cpu_m [NCPU];
  dcu_s2m_t  cpu_s [NCPU];
  dcu_m2s_t  plb_m [NCPU];
  dcu_s2m_t  plb_s [NCPU];
  c2b_t      nic_c2b;
  b2c_t      nic_b2c;
  ipif_m2s_t priv_m [NCPU];
  ipif_s2m_t priv_s [NCPU];
  ipif_m2s_t ddr_m;
  ipif_s2m_t ddr_s;

  coherent_memory_system dut (
    .clk, .rst_n, .cpu_m, .cpu_s, .plb_m, .plb_s, .nic_c2b, .nic_b2c,
    .priv_ipif_m(priv_m), .priv_ipif_s(priv_s), .ddr_m, .ddr_s);

  ddr_ipif_model #(.MEM_DW(1 << 17), .LATENCY(8)) u_ddr (.clk, .rst_n, .m(ddr_m), .s(ddr_s));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // no private traffic: PLB and private IPIF ports idle
  always_comb for (int c = 0; c < NCPU; c++) begin
    plb_s[c]  = '0;
    priv_m[c] = IPIF_M_IDLE;
  end

  // network interface: answers every BusRd/BusRdX with a miss
  logic nic_reply;
  always @(posedge clk) nic_reply <= rst_n && nic_b2c.snoop_valid &&
                                     (nic_b2c.snoop_cmd == CMD_BUSRD || nic_b2c.snoop_cmd == CMD_BUSRDX);
  always_comb begin
    nic_c2b = C2B_IDLE;
    nic_c2b.snoop_miss = nic_reply;
  end

  // ---------------------------------------------------------------- processor loads and stores
  task automatic ld(input int c, input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    cpu_m[c].request = 1'b1; cpu_m[c].rnw = 1'b1; cpu_m[c].abus = a;
    cpu_m[c].be = a[2] ? 8'h0F : 8'hF0;
    #1; while (!cpu_s[c].addrack) begin @(negedge clk); #1; end
    @(negedge clk); cpu_m[c].request = 1'b0;
    #1; while (!cpu_s[c].rddack) begin @(negedge clk); #1; end
    d = a[2] ? cpu_s[c].rddbus[31:0] : cpu_s[c].rddbus[63:32];
  endtask

  task automatic st(input int c, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    cpu_m[c].request = 1'b1; cpu_m[c].rnw = 1'b0; cpu_m[c].abus = a;
    cpu_m[c].be = a[2] ? 8'h0F : 8'hF0; cpu_m[c].wrdbus = {d, d};
    #1; while (!cpu_s[c].addrack) begin @(negedge clk); #1; end
    @(negedge clk); cpu_m[c].request = 1'b0;
    #1; while (!cpu_s[c].wrdack) begin @(negedge clk); #1; end
  endtask

  // writes are acknowledged before they are performed: wait until both
  // processors' posted accesses have drained (the program's final barrier)
  task automatic drain();
    @(negedge clk); #1;
    while (cpu_s[0].busy || cpu_s[1].busy) begin @(negedge clk); #1; end
  endtask

  // ---------------------------------------------------------------- 1. shared counter
  task automatic counter_thread(input int c);
    logic [31:0] other_flag, turn_v, v;
    for (int i = 0; i < ITER; i++) begin
      st(c, c == 0 ? FLAG0 : FLAG1, 32'd1);
      st(c, TURN, 32'(1 - c));
      do begin
        ld(c, c == 0 ? FLAG1 : FLAG0, other_flag);
        ld(c, TURN, turn_v);
      end while (other_flag == 32'd1 && turn_v == 32'(1 - c));
      ld(c, COUNTER, v);
      st(c, COUNTER, v + 1);
      st(c, c == 0 ? FLAG0 : FLAG1, 32'd0);
    end
  endtask

  // ---------------------------------------------------------------- 2. producer-consumer
  function automatic logic [31:0] pc_val(input logic [31:0] i);
    return 32'h5A00_0000 ^ (32'(i) * 32'h9E37_79B9);
  endfunction

  task automatic producer();
    logic [31:0] tail;
    for (int i = 0; i < PC_WORDS; i++) begin
      do ld(0, TAIL, tail); while (32'(i) - tail >= 32'(RING));
      st(0, RINGA + 32'(4 * (i % RING)), pc_val(i));
      st(0, HEAD, 32'(i + 1));
    end
  endtask

  task automatic consumer();
    logic [31:0] head, v;
    int bad = 0;
    for (int i = 0; i < PC_WORDS; i++) begin
      do ld(1, HEAD, head); while (head <= 32'(i));
      ld(1, RINGA + 32'(4 * (i % RING)), v);
      if (v != pc_val(i)) bad++;
      st(1, TAIL, 32'(i + 1));
    end
    check(bad == 0, $sformatf("consumer saw %0d wrong values of %0d", bad, PC_WORDS));
  endtask

  // ---------------------------------------------------------------- 3. merge sort
  // merge src[lo..mid) and src[mid..hi) into dst[lo..hi)
  task automatic merge_run(input int c, input logic [31:0] src, input logic [31:0] dst,
                           input int lo, input int mid, input int hi);
    int i = lo, j = mid;
    logic [31:0] a, b;
    if (i < mid) ld(c, src + 32'(4 * i), a);
    if (j < hi)  ld(c, src + 32'(4 * j), b);
    for (int k = lo; k < hi; k++) begin
      if (j >= hi || (i < mid && a <= b)) begin
        st(c, dst + 32'(4 * k), a);
        i++;
        if (i < mid) ld(c, src + 32'(4 * i), a);
      end else begin
        st(c, dst + 32'(4 * k), b);
        j++;
        if (j < hi) ld(c, src + 32'(4 * j), b);
      end
    end
  endtask

  // bottom-up sort of [lo, lo+n); returns the area holding the result
  task automatic sort_half(input int c, input int lo, input int n, output logic [31:0] res);
    logic [31:0] src = ARR, dst = TMP, t;
    for (int w = 1; w < n; w *= 2) begin
      for (int s = lo; s < lo + n; s += 2 * w)
        merge_run(c, src, dst, s, (s + w < lo + n) ? s + w : lo + n, (s + 2 * w < lo + n) ? s + 2 * w : lo + n);
      t = src; src = dst; dst = t;
    end
    res = src;
  endtask

  logic [31:0] ref_arr [SORT_N];

  initial begin
    logic [31:0] v, res0, res1, done;
    int t0, bad;
    for (int c = 0; c < NCPU; c++) cpu_m[c] = '0;
    // the program's initialised data: lock, counter and indices start at 0
    foreach (u_ddr.mem[i]) u_ddr.mem[i] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. shared counter
    t0 = cyc;
    fork
      counter_thread(0);
      counter_thread(1);
    join
    drain();
    ld(0, COUNTER, v);
    check(v == 32'(2 * ITER), $sformatf("shared counter = %0d (%0d expected)", v, 2 * ITER));
    ld(1, COUNTER, v);
    check(v == 32'(2 * ITER), "other processor reads the same final counter");
    $display("shared counter: %0d increments per processor in %0d cycles", ITER, cyc - t0);

    // 2. producer-consumer
    t0 = cyc;
    fork
      producer();
      consumer();
    join
    $display("producer-consumer: %0d words through a %0d-word ring in %0d cycles", PC_WORDS, RING, cyc - t0);

    // 3. merge sort
    for (int i = 0; i < SORT_N; i++) begin
      ref_arr[i] = $urandom;
      st(0, ARR + 32'(4 * i), ref_arr[i]);
    end
    ref_arr.sort();
    drain();
    t0 = cyc;
    fork
      sort_half(0, 0, SORT_N / 2, res0);
      begin
        sort_half(1, SORT_N / 2, SORT_N / 2, res1);
        st(1, DONE1, 32'd1);
      end
    join
    do ld(0, DONE1, done); while (done != 32'd1);
    // both halves end in the same area (same number of passes)
    check(res0 == res1, "both halves sorted into the same area");
    merge_run(0, res0, OUTA, 0, SORT_N / 2, SORT_N);
    drain();
    $display("merge sort: %0d words in %0d cycles", SORT_N, cyc - t0);
    bad = 0;
    for (int i = 0; i < SORT_N; i++) begin
      ld(i % 2, OUTA + 32'(4 * i), v);
      if (v != ref_arr[i]) bad++;
    end
    check(bad == 0, $sformatf("sorted output: %0d of %0d words wrong", bad, SORT_N));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400ms;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
