// tb_coherent_memory_system: end-to-end test of the coherent memory
// sub-system at its default size (two processors, 4 KB caches, three-port
// interconnect, DDR multiplexer).
//
// Around the design: a DDR controller model (ddr_ipif_model) on the DDR port,
// a PLB slave stub per processor for private traffic, a network-interface
// model on the third interconnect port (answers every BusRd/BusRdX with a miss
// and can send Update messages) and IPIF masters on the private-memory ports.
// The processors are modelled by tasks that drive the DCU ports the way the
// PLB protocol does: request held until addrack, write data acknowledged by
// wrdack, read data returned by rddack.
//
// Directed part: miss served by memory, read hit in 3 cycles and write in 2,
// remote hits, invalidation of shared copies, the dependency stall on a line
// being refilled, non-cacheable reads and writes, Update messages, private
// PLB and IPIF traffic meeting coherent traffic at the DDR multiplexer, a
// write-back cancelled by an Update, and an Invalidate turned into a BusRdX.
// Latencies at the processor port (request to last acknowledge, PLB cycles)
// are checked: read hit 3, write 2, critical word of a memory fetch 20, of a
// remote hit 8, non-cacheable read 17 (with the DDR model's latency of 8).
// Random part: both processors read and write words of eight lines that share
// two cache sets (so lines are evicted and written back). Each word is
// written by one processor only, with increasing values, so a reader can
// check that it never sees a value older than one it saw before, and the
// writer that it reads what it wrote last. At the end every word is read back
// and compared. Each mechanism is counted from the design's internal state and
// the test fails if one never happened.
module tb_coherent_memory_system;
  import ccs_pkg::*;

  localparam int NCPU = 2;
  localparam logic [31:0] SH  = 32'h0100_0000;   // shared window (default)
  localparam logic [31:0] NCA = 32'h01F0_0000;   // non-cacheable sub-range
  localparam logic [31:0] PRV = 32'h0000_4000;   // private address

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

  // ---------------------------------------------------------------- PLB slave stubs
  logic [31:0] prv_mem [NCPU][256];
  logic [NCPU-1:0] pl_busy, pl_rnw;
  logic [7:0]  pl_idx [NCPU];
  int n_plb = 0;
  for (genvar c = 0; c < NCPU; c++) begin : g_plb
    always_comb begin
      plb_s[c] = '0;
      plb_s[c].addrack = plb_m[c].request && !pl_busy[c];
      if (pl_busy[c]) begin
        plb_s[c].rddack = pl_rnw[c];
        plb_s[c].wrdack = !pl_rnw[c];
        plb_s[c].rddbus = {prv_mem[c][pl_idx[c]], prv_mem[c][pl_idx[c]]};
      end
    end
    always @(posedge clk) begin
      if (!rst_n) pl_busy[c] <= 1'b0;
      else if (pl_busy[c]) begin
        pl_busy[c] <= 1'b0;
        if (!pl_rnw[c]) prv_mem[c][pl_idx[c]] <= plb_m[c].abus[2] ? plb_m[c].wrdbus[31:0] : plb_m[c].wrdbus[63:32];
      end else if (plb_m[c].request) begin
        pl_busy[c] <= 1'b1; pl_rnw[c] <= plb_m[c].rnw; pl_idx[c] <= plb_m[c].abus[9:2];
        n_plb <= n_plb + 1;
      end
    end
  end

  // ---------------------------------------------------------------- network-interface model
  logic        nic_req, nic_dv, nic_reply;
  logic [31:0] nic_addr, nic_dout;
  always @(posedge clk) nic_reply <= rst_n && nic_b2c.snoop_valid &&
                                     (nic_b2c.snoop_cmd == CMD_BUSRD || nic_b2c.snoop_cmd == CMD_BUSRDX);
  always_comb begin
    nic_c2b = C2B_IDLE;
    nic_c2b.req        = nic_req;
    nic_c2b.cmd        = CMD_UPDATE;
    nic_c2b.addr       = nic_addr;
    nic_c2b.dout_valid = nic_dv;
    nic_c2b.dout       = nic_dout;
    nic_c2b.snoop_miss = nic_reply;
  end

  task automatic nic_update(input logic [31:0] a, input logic [31:0] seed);
    @(negedge clk);
    nic_req = 1'b1; nic_addr = a;
    #1; while (!nic_b2c.gnt) begin @(negedge clk); #1; end
    @(negedge clk); nic_req = 1'b0;
    for (int k = 0; k < 8; k++) begin
      nic_dv = 1'b1; nic_dout = seed + k;
      @(negedge clk);
    end
    nic_dv = 1'b0;
  endtask

  // ---------------------------------------------------------------- processor (DCU) tasks
  task automatic cpu_read(input int c, input logic [31:0] a, output logic [31:0] d, output int lat);
    int t0;
    @(negedge clk);
    cpu_m[c].request = 1'b1; cpu_m[c].rnw = 1'b1; cpu_m[c].abus = a;
    cpu_m[c].be = a[2] ? 8'h0F : 8'hF0;
    t0 = cyc;
    #1; while (!cpu_s[c].addrack) begin @(negedge clk); #1; end
    @(negedge clk); cpu_m[c].request = 1'b0;
    #1; while (!cpu_s[c].rddack) begin @(negedge clk); #1; end
    d   = a[2] ? cpu_s[c].rddbus[31:0] : cpu_s[c].rddbus[63:32];
    lat = cyc - t0 + 1;
  endtask

  task automatic cpu_write(input int c, input logic [31:0] a, input logic [31:0] d, output int lat);
    int t0;
    @(negedge clk);
    cpu_m[c].request = 1'b1; cpu_m[c].rnw = 1'b0; cpu_m[c].abus = a;
    cpu_m[c].be = a[2] ? 8'h0F : 8'hF0; cpu_m[c].wrdbus = {d, d};
    t0 = cyc;
    #1; while (!cpu_s[c].addrack) begin @(negedge clk); #1; end
    @(negedge clk); cpu_m[c].request = 1'b0;
    #1; while (!cpu_s[c].wrdack) begin @(negedge clk); #1; end
    lat = cyc - t0 + 1;
  endtask

  task automatic cpu_idle(input int c);
    @(negedge clk); #1;
    while (cpu_s[c].busy) begin @(negedge clk); #1; end
  endtask

  // ---------------------------------------------------------------- private IPIF masters
  task automatic priv_access(input int c, input bit rd, input logic [31:0] a, input logic [63:0] wd,
                             output logic [63:0] rdat);
    @(negedge clk);
    priv_m[c] = IPIF_M_IDLE;
    priv_m[c].cs = 1'b1; priv_m[c].rdreq = rd; priv_m[c].wrreq = !rd;
    priv_m[c].addr = a; priv_m[c].be = 8'hFF; priv_m[c].data = wd;
    @(negedge clk); priv_m[c].rdreq = 1'b0; priv_m[c].wrreq = 1'b0;
    #1; while (!(priv_s[c].rdack || priv_s[c].wrack)) begin @(negedge clk); #1; end
    rdat = priv_s[c].data;
    @(negedge clk); priv_m[c] = IPIF_M_IDLE;
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_rd_hit, n_wr_hit, n_ddr_fill, n_remote_hit, n_inv, n_convert, n_wb, n_wb_cancel;
  int n_update, n_nc_rd, n_nc_wr, n_fill_stall, n_mux_wait, n_shared_fill, n_busrdx;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_cpu[0].u_cache.a_hit_done && dut.g_cpu[0].u_cache.read_cmd)  n_rd_hit++;
    if (dut.g_cpu[1].u_cache.a_hit_done && dut.g_cpu[1].u_cache.read_cmd)  n_rd_hit++;
    if (dut.g_cpu[0].u_cache.a_tag_we) n_wr_hit++;
    if (dut.g_cpu[1].u_cache.a_tag_we) n_wr_hit++;
    if (dut.g_cpu[0].u_cache.cpu_st == dut.g_cpu[0].u_cache.CHECK_EQUALITY && dut.g_cpu[0].u_cache.a_fill_stall) n_fill_stall++;
    if (dut.g_cpu[1].u_cache.cpu_st == dut.g_cpu[1].u_cache.CHECK_EQUALITY && dut.g_cpu[1].u_cache.a_fill_stall) n_fill_stall++;
    if (dut.g_cpu[0].u_cache.bus_st == dut.g_cpu[0].u_cache.BUS_CHECK_CMD && !dut.g_cpu[0].u_cache.c_present) n_convert++;
    if (dut.g_cpu[1].u_cache.bus_st == dut.g_cpu[1].u_cache.BUS_CHECK_CMD && !dut.g_cpu[1].u_cache.c_present) n_convert++;
    if (dut.g_cpu[0].u_cache.wb_victim_hit) n_wb_cancel++;
    if (dut.g_cpu[1].u_cache.wb_victim_hit) n_wb_cancel++;
    if (dut.u_bus.any_grant) begin
      case (dut.u_bus.ci[dut.u_bus.win].cmd)
        CMD_INV:    n_inv++;
        CMD_UPDATE: n_update++;
        CMD_NC_RD:  n_nc_rd++;
        CMD_NC_WR:  n_nc_wr++;
        CMD_BUSRDX: n_busrdx++;
        default: ;
      endcase
    end
    if (dut.u_bus.arb_st == dut.u_bus.GATHER_REPLIES && dut.u_bus.all_replied) begin
      if (dut.u_bus.any_hit) n_remote_hit++; else n_ddr_fill++;
    end
    if (dut.u_bus.bwb_st == dut.u_bus.WB_CONFIRMED && dut.u_bus.bwb_cnt == 4'd7 &&
        dut.u_bus.ci[dut.u_bus.bwb_src].dout_valid) n_wb++;
    if (dut.u_bus.arb_st == dut.u_bus.POSITIVE_RESPONSE && !dut.u_bus.head_sent &&
        dut.u_bus.cur_cmd == CMD_BUSRD) n_shared_fill++;
    if (dut.u_ddr_mux.mux_st != dut.u_ddr_mux.MUX_IDLE &&
        (dut.u_ddr_mux.acc_st[0] == dut.u_ddr_mux.ACC_PENDING ||
         dut.u_ddr_mux.acc_st[1] == dut.u_ddr_mux.ACC_PENDING ||
         dut.u_ddr_mux.acc_st[2] == dut.u_ddr_mux.ACC_PENDING)) n_mux_wait++;
  end

  // remote-hit bus occupancy: grant to return to ARBITRATE = 11 cycles
  int pr_start, n_pr_len_ok, n_pr_len_bad;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_bus.any_grant) pr_start <= cyc;
    if (dut.u_bus.arb_st == dut.u_bus.POSITIVE_RESPONSE && dut.u_bus.cnt == 4'd7 &&
        dut.u_bus.ci[dut.u_bus.responder].dout_valid) begin
      if (cyc - pr_start + 1 == 11) n_pr_len_ok++; else n_pr_len_bad++;
    end
  end

  // ---------------------------------------------------------------- random part bookkeeping
  localparam int NW = 64;                 // 8 lines x 8 words
  logic [31:0] exp_val [NW];
  logic [23:0] last_seen [NCPU][NW];
  int          seq [NCPU];

  function automatic logic [31:0] waddr(input int w);
    int line, k, j;
    line = w / 8;
    k = line % 4; j = line / 4;
    return SH + 32'h0008_0000 + 32'(k * 32'h800) + 32'(j * 32'h20) + 32'((w % 8) * 4);
  endfunction

  task automatic random_agent(input int c, input int nops);
    logic [31:0] d;
    int lat, w;
    for (int n = 0; n < nops; n++) begin
      w = $urandom_range(NW - 1);
      if ((w % 2) == c && $urandom_range(2) == 0) begin
        seq[c]++;
        exp_val[w] = {8'(c + 1), 24'(seq[c])};
        cpu_write(c, waddr(w), exp_val[w], lat);
        check(lat == 2, "shared write takes 2 PLB cycles");
      end else begin
        cpu_read(c, waddr(w), d, lat);
        if ((w % 2) == c)
          check(d == exp_val[w], $sformatf("cpu%0d own word %0d: got %h exp %h", c, w, d, exp_val[w]));
        else begin
          check(d == 0 || d[31:24] == 8'((w % 2) + 1), $sformatf("cpu%0d word %0d foreign value %h", c, w, d));
          check(d[23:0] >= last_seen[c][w], $sformatf("cpu%0d word %0d went back in time: %h < %h", c, w, d[23:0], last_seen[c][w]));
          last_seen[c][w] = d[23:0];
        end
      end
    end
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    logic [31:0] d, d2;
    logic [63:0] q;
    int lat, lat2;
    for (int c = 0; c < NCPU; c++) begin
      cpu_m[c] = '0; priv_m[c] = IPIF_M_IDLE; seq[c] = 0;
      for (int w = 0; w < NW; w++) last_seen[c][w] = '0;
      for (int i = 0; i < 256; i++) prv_mem[c][i] = 32'(i) ^ 32'(c << 16);
    end
    for (int w = 0; w < NW; w++) exp_val[w] = '0;
    nic_req = 1'b0; nic_dv = 1'b0; nic_addr = '0; nic_dout = '0;
    // preload a line of shared memory
    for (int k = 0; k < 4; k++) u_ddr.mem[(SH + 32'h1000 + 32'(k * 8)) >> 3 & ((1 << 17) - 1)] = {32'(100 + 2*k), 32'(101 + 2*k)};
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. miss served by memory, then hits
    cpu_read(0, SH + 32'h1000 + 32'h14, d, lat);
    check(d == 105, $sformatf("miss from memory returns preloaded word (got %0d)", d));
    $display("latency: block fetch from memory, critical word = %0d PLB cycles", lat);
    check(lat == 20, $sformatf("memory fetch critical word in %0d cycles (20 expected; original system 21)", lat));
    cpu_read(0, SH + 32'h1000 + 32'h1C, d, lat);
    check(d == 107, "word after the critical one (refill dependency)");
    cpu_read(0, SH + 32'h1000 + 32'h00, d, lat);
    check(d == 100, "first word of the refilled line");
    cpu_idle(0);
    cpu_read(0, SH + 32'h1000 + 32'h08, d, lat);
    check(d == 102 && lat == 3, $sformatf("read hit: data %0d in %0d cycles (3 expected)", d, lat));
    cpu_write(0, SH + 32'h1000 + 32'h08, 32'hCAFE_0001, lat);
    check(lat == 2, $sformatf("write completes in %0d PLB cycles (2 expected)", lat));
    cpu_idle(0);
    cpu_read(0, SH + 32'h1000 + 32'h08, d, lat);
    check(d == 32'hCAFE_0001 && lat == 3, "read after write hit");

    // 2. remote hit: cpu1 reads the Modified line of cpu0 (both become Shared)
    cpu_read(1, SH + 32'h1000 + 32'h08, d, lat);
    check(d == 32'hCAFE_0001, $sformatf("remote hit returns the owner's data (%h)", d));
    $display("latency: remote hit, critical word = %0d PLB cycles", lat);
    check(lat == 8, $sformatf("remote hit critical word in %0d cycles (8 expected; original system 7)", lat));
    cpu_idle(1);
    // 3. write to Shared copy: Invalidate, then cpu0 reads it back via remote hit
    cpu_write(1, SH + 32'h1000 + 32'h0C, 32'hBEEF_0002, lat);
    cpu_idle(1);
    cpu_read(0, SH + 32'h1000 + 32'h0C, d, lat);
    check(d == 32'hBEEF_0002, $sformatf("invalidated copy refetched with new data (%h)", d));
    cpu_read(0, SH + 32'h1000 + 32'h08, d, lat);
    check(d == 32'hCAFE_0001, "other word of the line kept");

    // 4. non-cacheable accesses
    cpu_write(0, NCA + 32'h10, 32'h1234_5678, lat);
    check(lat == 2, "non-cacheable write acknowledged in 2 PLB cycles");
    cpu_write(1, NCA + 32'h14, 32'h9ABC_DEF0, lat);
    cpu_read(1, NCA + 32'h10, d, lat);
    check(d == 32'h1234_5678, $sformatf("non-cacheable read (%h)", d));
    cpu_read(0, NCA + 32'h14, d, lat);
    check(d == 32'h9ABC_DEF0, $sformatf("non-cacheable read, odd word (%h)", d));
    $display("latency: non-cacheable read on an idle system = %0d PLB cycles", lat);
    check(lat == 17, $sformatf("non-cacheable read in %0d cycles (17 expected, as in the original system)", lat));
    cpu_idle(0); cpu_idle(1);
    check(u_ddr.mem[((NCA + 32'h10) >> 3) & ((1 << 17) - 1)] == 64'h1234_5678_9ABC_DEF0, "non-cacheable writes reach memory");

    // 5. private traffic: PLB stub and private IPIF meeting coherent traffic
    cpu_write(0, PRV + 32'h20, 32'h0BAD_F00D, lat);
    cpu_read(0, PRV + 32'h20, d, lat);
    check(d == 32'h0BAD_F00D, "private access forwarded to the PLB");
    fork
      priv_access(0, 1'b0, 32'h0000_8000, 64'h1111_2222_3333_4444, q);
      priv_access(1, 1'b0, 32'h0000_8008, 64'h5555_6666_7777_8888, q);
      cpu_read(1, SH + 32'h3000, d, lat);
    join
    priv_access(0, 1'b1, 32'h0000_8008, '0, q);
    check(q == 64'h5555_6666_7777_8888, "private IPIF read sees other private write");
    check(d == 32'h0, "coherent miss served while private masters use memory");

    // 6. Update from the network interface on a line held by cpu0
    cpu_read(0, SH + 32'h3100, d, lat);
    cpu_idle(0);
    nic_update(SH + 32'h3100, 32'h7700_0000);
    repeat (3) @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      cpu_read(0, SH + 32'h3100 + 32'(4 * k), d, lat);
      check(d == 32'h7700_0000 + 32'(k), $sformatf("Update word %0d seen by the cache (%h)", k, d));
    end
    repeat (40) @(negedge clk);
    check(u_ddr.mem[((SH + 32'h3100) >> 3) & ((1 << 17) - 1)] == {32'h7700_0000, 32'h7700_0001}, "Update written to memory");

    // 7. write-back cancelled by an Update: sweep the Update's start
    for (int dly = 0; dly < 12 && n_wb_cancel == 0; dly++) begin
      logic [31:0] x, x2, y;
      x  = SH + 32'h0004_0000 + 32'(dly * 32'h20);
      x2 = x + 32'h800;
      y  = x + 32'h1000;
      cpu_write(0, x, 32'hD1D1_0000 + 32'(dly), lat);   // x dirty
      cpu_read(0, x2, d, lat);                          // x2 most recent: x is the victim
      cpu_idle(0);
      fork
        cpu_read(0, y, d, lat);
        begin repeat (dly) @(negedge clk); nic_update(x, 32'h5500_0000); end
      join
      cpu_idle(0);
      repeat (40) @(negedge clk);
      cpu_read(1, x, d2, lat);
      check(d2 == 32'h5500_0000, $sformatf("line after Update/eviction race (dly %0d): %h", dly, d2));
    end

    // 8. both processors write the same Shared line at once: one Invalidate
    //    finds its copy gone and is sent as BusRdX
    for (int dly = 0; dly < 6 && n_convert == 0; dly++) begin
      logic [31:0] z;
      z = SH + 32'h0005_0000 + 32'(dly * 32'h20);
      cpu_read(0, z, d, lat);
      cpu_read(1, z, d, lat);
      cpu_idle(0); cpu_idle(1);
      fork
        cpu_write(0, z, 32'hA0A0_0000, lat);
        begin repeat (dly) @(negedge clk); cpu_write(1, z + 4, 32'hB1B1_0000, lat2); end
      join
      cpu_idle(0); cpu_idle(1);
      cpu_read(1, z, d, lat);
      cpu_read(0, z + 4, d2, lat);
      check(d == 32'hA0A0_0000 && d2 == 32'hB1B1_0000, $sformatf("simultaneous writes both kept (%h %h)", d, d2));
    end

    // 9. random sharing with evictions
    fork
      random_agent(0, 1500);
      random_agent(1, 1500);
    join
    cpu_idle(0); cpu_idle(1);
    for (int w = 0; w < NW; w++) begin
      cpu_read(w % 2 == 0 ? 1 : 0, waddr(w), d, lat);
      check(d == exp_val[w], $sformatf("final word %0d: %h exp %h", w, d, exp_val[w]));
    end

    // every mechanism must have happened
    $display("mechanisms: read_hit=%0d write_hit=%0d ddr_fill=%0d remote_hit=%0d shared_fill=%0d invalidate=%0d",
             n_rd_hit, n_wr_hit, n_ddr_fill, n_remote_hit, n_shared_fill, n_inv);
    $display("            busrdx=%0d inv_to_busrdx=%0d writeback=%0d wb_cancel=%0d update=%0d nc_rd=%0d nc_wr=%0d",
             n_busrdx, n_convert, n_wb, n_wb_cancel, n_update, n_nc_rd, n_nc_wr);
    $display("            fill_stall=%0d ddr_mux_wait=%0d plb_private=%0d remote_hit_11cyc=%0d/%0d",
             n_fill_stall, n_mux_wait, n_plb, n_pr_len_ok, n_pr_len_ok + n_pr_len_bad);
    check(n_rd_hit > 0, "read hits happened");
    check(n_wr_hit > 0, "write hits happened");
    check(n_ddr_fill > 0, "refills from memory happened");
    check(n_remote_hit > 0, "remote hits happened");
    check(n_shared_fill > 0, "Shared refills happened");
    check(n_inv > 0, "Invalidates happened");
    check(n_busrdx > 0, "BusRdX happened");
    check(n_convert > 0, "Invalidate turned into BusRdX happened");
    check(n_wb > 0, "write-backs happened");
    check(n_wb_cancel > 0, "write-back cancellation happened");
    check(n_update > 0, "Update messages happened");
    check(n_nc_rd > 0 && n_nc_wr > 0, "non-cacheable reads and writes happened");
    check(n_fill_stall > 0, "dependency stalls happened");
    check(n_mux_wait > 0, "DDR multiplexer contention happened");
    check(n_plb > 0, "private PLB traffic happened");
    check(n_pr_len_bad == 0 && n_pr_len_ok > 0, "remote hits occupy the bus 11 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
