// tb_coherent_bus: the interconnect with three participant models and the
// DDR controller model.
//
// Each participant model answers every broadcast BusRd/BusRdX one cycle after
// the broadcast, with a hit or a miss as the test sets it, and on a hit sends
// 8 words from the second cycle after its reply, as a cache does. Requests
// are driven by tasks. Bus occupancy of each message is measured black-box:
// a second participant requests at the same time, and the gap between the two
// grants is the bus time of the first message. Expected (design): NcWr 2,
// Invalidate 2, Update 9, BusRd/BusRdX served by another participant 11.
// Also checked: the block or word a requester receives (from another
// participant or from memory, critical double word first), the shared flag,
// Update words delivered to the others and written to memory, non-cacheable
// writes with byte enables, write-backs acknowledged after four words and
// written to memory, a cancelled write-back leaving memory alone, round-robin
// order among three waiting requests, and that every broadcast reaches all
// participants but the sender.
module tb_coherent_bus;
  import ccs_pkg::*;
  localparam int NP = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  c2b_t      ci [NP];
  b2c_t      co [NP];
  ipif_m2s_t ddr_m;
  ipif_s2m_t ddr_s;
  coherent_bus #(.NP(NP)) dut (.clk, .rst_n, .ci, .co, .ddr_m, .ddr_s);
  ddr_ipif_model #(.MEM_DW(4096), .LATENCY(5)) u_ddr (.clk, .rst_n, .m(ddr_m), .s(ddr_s));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // ---------------------------------------------------------------- participant models
  logic        rq [NP], rq_wbf [NP], tdv [NP], twbs [NP], twbc [NP];
  bus_cmd_e    rq_cmd [NP];
  logic [31:0] rq_addr [NP], tdout [NP];
  logic [3:0]  tbe [NP];
  logic        hit_cfg [NP];
  int          rs [NP];
  logic [31:0] rs_base [NP];
  int          n_snoops [NP];

  for (genvar p = 0; p < NP; p++) begin : g_p
    always @(posedge clk) begin
      if (!rst_n) begin rs[p] <= 0; n_snoops[p] <= 0; end
      else begin
        if (co[p].snoop_valid) n_snoops[p] <= n_snoops[p] + 1;
        if (co[p].snoop_valid && co[p].snoop_cmd inside {CMD_BUSRD, CMD_BUSRDX}) begin
          rs[p] <= 1; rs_base[p] <= co[p].snoop_addr;
        end else if (rs[p] == 1 && !hit_cfg[p]) rs[p] <= 0;
        else if (rs[p] >= 1 && rs[p] < 10) rs[p] <= rs[p] + 1;
        else rs[p] <= 0;
      end
    end
    always_comb begin
      ci[p] = C2B_IDLE;
      ci[p].req = rq[p]; ci[p].cmd = rq_cmd[p]; ci[p].addr = rq_addr[p]; ci[p].wbf = rq_wbf[p];
      ci[p].snoop_hit  = (rs[p] == 1) && hit_cfg[p];
      ci[p].snoop_miss = (rs[p] == 1) && !hit_cfg[p];
      ci[p].dout_valid = tdv[p] || (rs[p] >= 3);
      ci[p].dout       = (rs[p] >= 3) ? (32'hD000_0000 | 32'(p << 16) | 32'(rs[p] - 3)) : tdout[p];
      ci[p].dout_be    = tbe[p];
      ci[p].wb_start   = twbs[p];
      ci[p].wb_cancel  = twbc[p];
    end
  end

  // words received by each participant
  logic [31:0] rx [NP][$];
  logic        rx_head_shared [NP];
  int          n_heads [NP];
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NP; p++)
      if (co[p].din_valid) begin
        if (co[p].din_head) begin n_heads[p]++; rx_head_shared[p] <= co[p].din_shared; rx[p].push_back(co[p].din_data); end
        else rx[p].push_back(co[p].din_data);
      end

  task automatic request(input int p, input bus_cmd_e c, input logic [31:0] a, input bit wbf, output int gcyc);
    @(negedge clk);
    rq[p] = 1; rq_cmd[p] = c; rq_addr[p] = a; rq_wbf[p] = wbf;
    #1; while (!co[p].gnt) begin @(negedge clk); #1; end
    gcyc = cyc;
    @(negedge clk); rq[p] = 0; rq_wbf[p] = 0;
  endtask

  task automatic send_words(input int p, input logic [31:0] seed, input int n, input logic [3:0] be);
    for (int k = 0; k < n; k++) begin
      tdv[p] = 1; tdout[p] = seed + 32'(k); tbe[p] = be;
      @(negedge clk);
    end
    tdv[p] = 0;
  endtask

  task automatic msg(input int p, input bus_cmd_e c, input logic [31:0] a, input logic [31:0] seed, output int g);
    request(p, c, a, 1'b0, g);
    if (c == CMD_NC_WR) send_words(p, seed, 1, 4'b1010);
    if (c == CMD_UPDATE) send_words(p, seed, 8, 4'hF);
  endtask

  // occupancy of message c from p0, probed by an Invalidate from p1
  task automatic occupancy(input bus_cmd_e c, input logic [31:0] a, input int exp_cycles, input string name);
    int g0, g1;
    dut.rr_ptr = 2'd2;   // p0 first
    fork
      msg(0, c, a, 32'h1000_0000, g0);
      begin repeat (0) @(negedge clk); request(1, CMD_INV, 32'h0100_7700, 1'b0, g1); end
    join
    check(g1 - g0 == exp_cycles, $sformatf("%s occupies the bus %0d cycles (expected %0d)", name, g1 - g0, exp_cycles));
    repeat (4) @(negedge clk);
  endtask

  initial begin
    int g0, g1, g2;
    for (int p = 0; p < NP; p++) begin
      rq[p] = 0; rq_wbf[p] = 0; tdv[p] = 0; twbs[p] = 0; twbc[p] = 0; rq_cmd[p] = CMD_NONE;
      rq_addr[p] = '0; tdout[p] = '0; tbe[p] = '0; hit_cfg[p] = 0; n_heads[p] = 0;
    end
    for (int i = 0; i < 4096; i++) u_ddr.mem[i] = {32'(2 * i), 32'(2 * i + 1)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // bus occupancy of each message
    occupancy(CMD_NC_WR,  32'h0100_0104, 2, "NcWr");
    occupancy(CMD_INV,    32'h0100_0200, 2, "Invalidate");
    occupancy(CMD_UPDATE, 32'h0100_0300, 9, "Update");
    hit_cfg[2] = 1;
    for (int p = 0; p < NP; p++) rx[p].delete();
    occupancy(CMD_BUSRD,  32'h0100_0414, 11, "BusRd served by another participant");
    check(rx[0].size() == 9 && rx[0][0] == 32'h0100_0414, "requester got head and 8 words");
    for (int k = 0; k < 8 && rx[0].size() == 9; k++)
      check(rx[0][k+1] == (32'hD002_0000 | 32'(k)), $sformatf("remote word %0d = %h", k, rx[0][k+1]));
    check(rx_head_shared[0] == 1'b1, "BusRd served remotely is loaded Shared");
    for (int p = 0; p < NP; p++) rx[p].delete();
    occupancy(CMD_BUSRDX, 32'h0100_0420, 11, "BusRdX served by another participant");
    check(rx_head_shared[0] == 1'b0, "BusRdX is loaded without the shared flag");
    hit_cfg[2] = 0;

    // Update went to the other two and to memory
    check(u_ddr.mem[(32'h0100_0300 >> 3) & 4095] == {32'h1000_0000, 32'h1000_0001} &&
          u_ddr.mem[(32'h0100_0318 >> 3) & 4095] == {32'h1000_0006, 32'h1000_0007}, "Update written to memory");
    // NcWr with byte enables 1010 on the odd word of 0x..0100
    check(u_ddr.mem[(32'h0100_0100 >> 3) & 4095] == {32'(2 * 32), 32'h1000_0000 & 32'hFF00_FF00 | 32'(2 * 32 + 1) & 32'h00FF_00FF},
          "non-cacheable write with byte enables");

    // miss served by memory: critical double word first
    for (int p = 0; p < NP; p++) rx[p].delete();
    request(0, CMD_BUSRD, 32'h0100_0A34, 1'b0, g0);
    wait (rx[0].size() == 9);
    check(rx[0][0] == 32'h0100_0A30, $sformatf("head of memory block %h", rx[0][0]));
    for (int k = 0; k < 8; k++) begin
      int dw, wi;
      dw = (32'h0100_0A30 >> 3) & 4095;
      wi = (((dw & 3) * 2 + k) % 8);
      check(rx[0][k+1] == u_ddr.mem[(dw & ~3) + wi / 2][(wi % 2) ? 31 : 63 -: 32],
            $sformatf("memory word %0d = %h", k, rx[0][k+1]));
    end
    // non-cacheable read, odd word
    for (int p = 0; p < NP; p++) rx[p].delete();
    request(1, CMD_NC_RD, 32'h0100_0C0C, 1'b0, g0);
    wait (rx[1].size() == 2);
    check(rx[1][1] == u_ddr.mem[(32'h0100_0C0C >> 3) & 4095][31:0], "non-cacheable read word");

    // write-back with a BusRd: ack after 4 words, block in memory
    begin
      int ack_at;
      ack_at = -1;
      fork
        request(2, CMD_BUSRD, 32'h0100_0E00, 1'b1, g0);
        begin
          @(negedge clk); @(negedge clk);
          twbs[2] = 1; tdout[2] = 32'h0100_0D08; @(negedge clk); twbs[2] = 0;
          for (int k = 0; k < 8; k++) begin
            tdv[2] = 1; tdout[2] = 32'hBB00_0000 + 32'(k); #1;
            if (co[2].wb_ack) ack_at = k;
            @(negedge clk);
          end
          tdv[2] = 0;
        end
      join
      check(ack_at == 3, $sformatf("write-back acknowledged with word %0d (4th expected)", ack_at + 1));
      repeat (40) @(negedge clk);
      check(u_ddr.mem[(32'h0100_0D08 >> 3) & 4095] == {32'hBB00_0000, 32'hBB00_0001} &&
            u_ddr.mem[(32'h0100_0D00 >> 3) & 4095] == {32'hBB00_0006, 32'hBB00_0007}, "write-back block in memory (wrapped)");
    end
    // cancelled write-back: memory unchanged
    begin
      logic [63:0] prev_val;
      prev_val = u_ddr.mem[(32'h0100_0F00 >> 3) & 4095];
      fork
        request(2, CMD_BUSRD, 32'h0100_0E40, 1'b1, g0);
        begin @(negedge clk); @(negedge clk); twbc[2] = 1; @(negedge clk); twbc[2] = 0; end
      join
      repeat (40) @(negedge clk);
      check(u_ddr.mem[(32'h0100_0F00 >> 3) & 4095] == prev_val, "cancelled write-back not written");
      request(0, CMD_INV, 32'h0100_0F00, 1'b0, g0);
      check(1'b1, "bus free after a cancelled write-back");
    end

    // round robin: three waiting Invalidates
    dut.rr_ptr = 2'd0;
    fork
      request(0, CMD_INV, 32'h0100_1000, 1'b0, g0);
      request(1, CMD_INV, 32'h0100_1020, 1'b0, g1);
      request(2, CMD_INV, 32'h0100_1040, 1'b0, g2);
    join
    check(g1 < g2 && g2 < g0, $sformatf("round robin order 1,2,0 (%0d %0d %0d)", g1, g2, g0));
    check(n_snoops[0] > 0 && n_snoops[1] > 0 && n_snoops[2] > 0, "broadcasts reach the others");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #50us; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
