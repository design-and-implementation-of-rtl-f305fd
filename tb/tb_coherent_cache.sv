// tb_coherent_cache: two coherent caches on the interconnect with the DDR
// controller model behind it and a network-interface model on the third port
// (it answers broadcasts with a miss and sends Update messages). The
// processor ports of the caches are driven directly: command, address, data
// and byte enables held until cache_ack.
//
// Checked: a hit takes 2 cycles from command to cache_ack; the MESI state of
// the line in both caches after each step (read miss -> Exclusive, write hit
// on Exclusive -> Modified without bus traffic, remote read -> both Shared,
// write on Shared -> Invalidate, Modified elsewhere; write miss -> BusRdX);
// data returned in every case, including a write miss merged into the
// incoming line; eviction of a dirty line written back to memory; an Update
// changing the data of a held line but not its state and clearing its dirty
// bit; non-cacheable reads and writes; byte-enabled writes.
module tb_coherent_cache;
  import ccs_pkg::*;
  localparam int NP = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        rd [2], wr [2], nc [2], ack [2];
  logic [31:0] addr [2], wdata [2], rdata [2];
  logic [3:0]  be [2];
  c2b_t        c2b [NP];
  b2c_t        b2c [NP];
  ipif_m2s_t   ddr_m;
  ipif_s2m_t   ddr_s;

  coherent_cache u_c0 (.clk, .rst_n, .read_cmd(rd[0]), .write_cmd(wr[0]), .non_cacheable(nc[0]),
    .address(addr[0]), .data_in(wdata[0]), .be_in(be[0]), .cache_ack(ack[0]), .data_out(rdata[0]),
    .bo(c2b[0]), .bi(b2c[0]));
  coherent_cache u_c1 (.clk, .rst_n, .read_cmd(rd[1]), .write_cmd(wr[1]), .non_cacheable(nc[1]),
    .address(addr[1]), .data_in(wdata[1]), .be_in(be[1]), .cache_ack(ack[1]), .data_out(rdata[1]),
    .bo(c2b[1]), .bi(b2c[1]));
  coherent_bus #(.NP(NP)) u_bus (.clk, .rst_n, .ci(c2b), .co(b2c), .ddr_m, .ddr_s);
  ddr_ipif_model #(.MEM_DW(4096), .LATENCY(6)) u_ddr (.clk, .rst_n, .m(ddr_m), .s(ddr_s));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // network-interface model
  logic nic_req, nic_dv, nic_reply;
  logic [31:0] nic_addr, nic_dout;
  always @(posedge clk) nic_reply <= rst_n && b2c[2].snoop_valid && b2c[2].snoop_cmd inside {CMD_BUSRD, CMD_BUSRDX};
  always_comb begin
    c2b[2] = C2B_IDLE;
    c2b[2].req = nic_req; c2b[2].cmd = CMD_UPDATE; c2b[2].addr = nic_addr;
    c2b[2].dout_valid = nic_dv; c2b[2].dout = nic_dout; c2b[2].snoop_miss = nic_reply;
  end

  task automatic access(input int c, input bit w, input bit ncb, input logic [31:0] a,
                        input logic [31:0] d, input logic [3:0] b, output logic [31:0] q, output int lat);
    int t0;
    @(negedge clk);
    rd[c] = !w; wr[c] = w; nc[c] = ncb; addr[c] = a; wdata[c] = d; be[c] = b;
    t0 = cyc;
    #1; while (!ack[c]) begin @(negedge clk); #1; end
    q = rdata[c]; lat = cyc - t0 + 1;
    @(negedge clk); rd[c] = 0; wr[c] = 0;
  endtask

  function automatic mesi_e state_of(input int c, input logic [31:0] a);
    logic [5:0] i;
    i = a[10:5];
    for (int w = 0; w < 2; w++) begin
      if (c == 0 && u_c0.tag_q[w][i] == a[31:11] && u_c0.st_q[w][i] != ST_I) return u_c0.st_q[w][i];
      if (c == 1 && u_c1.tag_q[w][i] == a[31:11] && u_c1.st_q[w][i] != ST_I) return u_c1.st_q[w][i];
    end
    return ST_I;
  endfunction

  function automatic logic dirty_of(input int c, input logic [31:0] a);
    logic [5:0] i;
    i = a[10:5];
    for (int w = 0; w < 2; w++) begin
      if (c == 0 && u_c0.tag_q[w][i] == a[31:11] && u_c0.st_q[w][i] != ST_I) return u_c0.dirty_q[w][i];
      if (c == 1 && u_c1.tag_q[w][i] == a[31:11] && u_c1.st_q[w][i] != ST_I) return u_c1.dirty_q[w][i];
    end
    return 1'b0;
  endfunction

  function automatic logic [31:0] memw(input logic [31:0] a);
    logic [63:0] x;
    x = u_ddr.mem[(a >> 3) & 4095];
    return a[2] ? x[31:0] : x[63:32];
  endfunction

  int n_bus_msgs;
  always @(posedge clk) if (rst_n && u_bus.any_grant) n_bus_msgs++;

  initial begin
    logic [31:0] q;
    int lat, nb;
    logic [31:0] A, B, C;
    A = 32'h0100_2040; B = A + 32'h800; C = A + 32'h1000;
    for (int c = 0; c < 2; c++) begin rd[c] = 0; wr[c] = 0; nc[c] = 0; addr[c] = 0; wdata[c] = 0; be[c] = 0; end
    nic_req = 0; nic_dv = 0; nic_addr = 0; nic_dout = 0; n_bus_msgs = 0;
    for (int i = 0; i < 4096; i++) u_ddr.mem[i] = {32'h5000_0000 | 32'(2 * i), 32'h5000_0000 | 32'(2 * i + 1)};
    repeat (3) @(posedge clk);
    rst_n = 1;

    access(0, 0, 0, A + 12, 0, 0, q, lat);
    check(q == memw(A + 12), $sformatf("read miss returns memory word (%h)", q));
    check(lat > 2, "a miss takes longer than a hit");
    check(state_of(0, A) == ST_E, "read miss alone: Exclusive");
    repeat (12) @(negedge clk);
    access(0, 0, 0, A + 28, 0, 0, q, lat);
    check(q == memw(A + 28) && lat == 2, $sformatf("read hit in %0d cycles (2 expected)", lat));
    nb = n_bus_msgs;
    access(0, 1, 0, A + 4, 32'h1111_1111, 4'hF, q, lat);
    check(lat == 2 && state_of(0, A) == ST_M && dirty_of(0, A), "write hit on Exclusive: Modified, dirty, 2 cycles");
    check(n_bus_msgs == nb, "no bus message for a write on Exclusive");
    access(0, 1, 0, A + 8, 32'hAABB_CCDD, 4'b0101, q, lat);

    access(1, 0, 0, A + 4, 0, 0, q, lat);
    check(q == 32'h1111_1111, $sformatf("remote hit returns Modified data (%h)", q));
    repeat (10) @(negedge clk);
    check(state_of(0, A) == ST_S && state_of(1, A) == ST_S, "remote read: both Shared");
    access(1, 0, 0, A + 8, 0, 0, q, lat);
    check(q == ((memw(A + 8) & 32'hFF00_FF00) | 32'h00BB_00DD), $sformatf("byte-enabled write (%h)", q));

    access(1, 1, 0, A + 16, 32'h2222_2222, 4'hF, q, lat);
    repeat (4) @(negedge clk);
    check(state_of(1, A) == ST_M && state_of(0, A) == ST_I, "write on Shared: Invalidate, Modified / Invalid");

    access(0, 1, 0, A + 20, 32'h3333_3333, 4'hF, q, lat);
    repeat (12) @(negedge clk);
    check(state_of(0, A) == ST_M && state_of(1, A) == ST_I, "write miss: BusRdX, Modified / Invalid");
    access(0, 0, 0, A + 16, 0, 0, q, lat);
    check(q == 32'h2222_2222, "line moved with the other cache's data");
    access(0, 0, 0, A + 20, 0, 0, q, lat);
    check(q == 32'h3333_3333, "write-miss data merged into the line");

    // evict the dirty line A from cache 0: B and C map to the same set
    access(0, 0, 0, B, 0, 0, q, lat);
    access(0, 0, 0, C, 0, 0, q, lat);
    repeat (60) @(negedge clk);
    check(state_of(0, A) == ST_I, "A evicted");
    check(memw(A + 16) == 32'h2222_2222 && memw(A + 20) == 32'h3333_3333 && memw(A + 4) == 32'h1111_1111,
          "dirty line written back to memory");

    // Update from the network interface on B held by cache 0 (Exclusive)
    access(1, 0, 0, B + 4, 0, 0, q, lat);     // B Shared in both
    repeat (12) @(negedge clk);
    access(0, 1, 0, B + 8, 32'h4444_4444, 4'hF, q, lat);  // Invalidate; cache 0 Modified
    repeat (10) @(negedge clk);
    check(dirty_of(0, B) && state_of(0, B) == ST_M, "B Modified in cache 0");
    @(negedge clk); nic_req = 1; nic_addr = B;
    #1; while (!b2c[2].gnt) begin @(negedge clk); #1; end
    @(negedge clk); nic_req = 0;
    for (int k = 0; k < 8; k++) begin nic_dv = 1; nic_dout = 32'h6600_0000 + 32'(k); @(negedge clk); end
    nic_dv = 0;
    repeat (3) @(negedge clk);
    check(state_of(0, B) == ST_M && !dirty_of(0, B), "Update keeps the state, clears dirty");
    for (int k = 0; k < 8; k++) begin
      access(0, 0, 0, B + 32'(4 * k), 0, 0, q, lat);
      check(q == 32'h6600_0000 + 32'(k), $sformatf("Update word %0d (%h)", k, q));
    end

    // non-cacheable
    access(1, 1, 1, 32'h01F0_0008, 32'h7777_8888, 4'hF, q, lat);
    access(0, 0, 1, 32'h01F0_0008, 0, 0, q, lat);
    check(q == 32'h7777_8888, "non-cacheable write then read");
    check(state_of(0, 32'h01F0_0008) == ST_I, "non-cacheable data not cached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #50us; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
