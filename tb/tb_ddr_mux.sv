// tb_ddr_mux: three IPIF masters share the DDR controller model through
// ddr_mux. Each master runs random single and burst reads and writes on its
// own address region at the same time as the others and checks every word it
// reads against a reference copy. The testbench also checks that a single
// transfer's one-cycle request is never lost while another master holds the
// memory (every transfer completes), that acknowledges reach only the
// selected master, that chip select is low for at least one cycle between
// transfers at the controller, and that the mux was really contended.
module tb_ddr_mux;
  import ccs_pkg::*;
  localparam int NI = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ipif_m2s_t m_in [NI];
  ipif_s2m_t s_out [NI];
  ipif_m2s_t ddr_m;
  ipif_s2m_t ddr_s;

  ddr_mux #(.NI(NI)) dut (.clk, .rst_n, .m_in, .s_out, .ddr_m, .ddr_s);
  ddr_ipif_model #(.MEM_DW(1024), .LATENCY(3)) u_ddr (.clk, .rst_n, .m(ddr_m), .s(ddr_s));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [63:0] ref_mem [1024];
  int n_wait = 0, n_xfer = 0, n_stray = 0;
  logic cs_q;
  always @(posedge clk) if (rst_n) begin
    cs_q <= ddr_m.cs;
    if (ddr_m.cs && (ddr_m.rdreq || ddr_m.wrreq) && !cs_q) n_xfer++;
    if (ddr_m.cs && !cs_q && dut.mux_st != dut.MUX_FIRST) n_stray++;
    for (int i = 0; i < NI; i++)
      if (dut.acc_st[i] == dut.ACC_PENDING && dut.mux_st != dut.MUX_IDLE) n_wait++;
    for (int i = 0; i < NI; i++)
      if ((s_out[i].rdack || s_out[i].wrack) && !(m_in[i].cs && dut.sel == 2'(i))) n_stray++;
  end

  function automatic int idx(input logic [31:0] a, input int beat);
    return int'({a[9:5], 2'(a[4:3] + 2'(beat))});
  endfunction

  task automatic xfer(input int m, input bit rd, input bit burst, input logic [31:0] a);
    logic [63:0] wd;
    int beat = 0;
    @(negedge clk);
    m_in[m] = IPIF_M_IDLE;
    m_in[m].cs = 1; m_in[m].rdreq = rd; m_in[m].wrreq = !rd; m_in[m].burst = burst;
    m_in[m].addr = a; m_in[m].be = 8'hFF;
    wd = {32'(m), 32'($urandom)};
    m_in[m].data = wd;
    if (!burst) begin
      @(negedge clk); m_in[m].rdreq = 0; m_in[m].wrreq = 0;
    end
    while (beat < (burst ? 4 : 1)) begin
      #1;
      if (s_out[m].rdack || s_out[m].wrack) begin
        if (rd) check(s_out[m].data == ref_mem[idx(a, beat)],
                      $sformatf("master %0d read %h beat %0d: %h exp %h", m, a, beat, s_out[m].data, ref_mem[idx(a, beat)]));
        else ref_mem[idx(a, beat)] = wd;
        beat++;
        @(negedge clk);
        wd = {32'(m), 32'($urandom)};
        m_in[m].data = wd;
      end else @(negedge clk);
    end
    m_in[m] = IPIF_M_IDLE;
  endtask

  task automatic agent(input int m);
    for (int n = 0; n < 300; n++) begin
      logic [31:0] a;
      a = {22'b0, 2'(m), 3'($urandom), 2'($urandom), 3'b000};
      xfer(m, $urandom_range(1) == 0, $urandom_range(1) == 0, a);
      repeat ($urandom_range(3)) @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < NI; i++) m_in[i] = IPIF_M_IDLE;
    for (int i = 0; i < 1024; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork agent(0); agent(1); agent(2); join
    check(n_xfer == 900, $sformatf("all 900 transfers reached the controller (%0d)", n_xfer));
    check(n_wait > 0, "inputs waited for each other");
    check(n_stray == 0, "no acknowledge to an unselected master, no transfer without gap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #500us; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
