// coherent_memory_system: the coherent memory sub-system of a two-processor
// shared-memory node. Top level.
//
// For each processor a request filter (plb2cache) splits the data-side PLB
// traffic: private addresses continue to the processor's own PLB bus
// (plb_m/plb_s ports), shared ones go to that processor's coherent cache.
// The caches, and a third port for a network interface (nic_c2b/nic_b2c),
// meet on the coherent interconnect (coherent_bus). The interconnect's IPIF
// master and the two private-memory bridges' IPIF masters (priv_ipif_m/_s,
// the PLB-to-IPIF bridges are outside this block) share the DDR controller's
// IPIF slave port (ddr_m/ddr_s) through ddr_mux: input 0 is the coherent
// path, input 1+i the private path of processor i.
//
// Everything runs on one clock, clk, with an active-low synchronous reset.
// The processors, PLB buses, PLB-to-IPIF bridges, DDR controller, DDR devices
// and network interface are not part of this block; their signals are ports.
//
// Follows the design's structure (PLB2Cache, cache, interconnect, DDR_MUX per
// the block diagram, caches of 4 KB, three bus participants). Own choice: a
// single clock domain.
module coherent_memory_system
  import ccs_pkg::*;
#(
  parameter int          NCPU        = 2,
  parameter int          CACHE_BYTES = 4096,
  parameter logic [31:0] SHARED_BASE = 32'h0100_0000,
  parameter logic [31:0] SHARED_MASK = 32'hFF00_0000,
  parameter logic [31:0] NC_BASE     = 32'h01F0_0000,
  parameter logic [31:0] NC_MASK     = 32'hFFF0_0000
) (
  input  logic      clk,
  input  logic      rst_n,
  // processors' data-side PLB masters
  input  dcu_m2s_t  cpu_m [NCPU],
  output dcu_s2m_t  cpu_s [NCPU],
  // processors' PLB buses (private traffic)
  output dcu_m2s_t  plb_m [NCPU],
  input  dcu_s2m_t  plb_s [NCPU],
  // network-interface port of the interconnect
  input  c2b_t      nic_c2b,
  output b2c_t      nic_b2c,
  // private-memory IPIF masters
  input  ipif_m2s_t priv_ipif_m [NCPU],
  output ipif_s2m_t priv_ipif_s [NCPU],
  // DDR controller IPIF slave
  output ipif_m2s_t ddr_m,
  input  ipif_s2m_t ddr_s
);
  localparam int NP = NCPU + 1;

  c2b_t      c2b [NP];
  b2c_t      b2c [NP];
  ipif_m2s_t mux_m [NP];
  ipif_s2m_t mux_s [NP];

  for (genvar i = 0; i < NCPU; i++) begin : g_cpu
    logic        read_cmd, write_cmd, non_cacheable, cache_ack;
    logic [31:0] address, data_in, data_out;
    logic [3:0]  be;

    plb2cache #(
      .SHARED_BASE(SHARED_BASE), .SHARED_MASK(SHARED_MASK),
      .NC_BASE(NC_BASE), .NC_MASK(NC_MASK)
    ) u_plb2cache (
      .clk, .rst_n,
      .dcu_m(cpu_m[i]), .dcu_s(cpu_s[i]),
      .plb_m(plb_m[i]), .plb_s(plb_s[i]),
      .read_cmd, .write_cmd, .non_cacheable, .address, .data_in, .be_out(be),
      .cache_ack, .data_out
    );

    coherent_cache #(.CACHE_BYTES(CACHE_BYTES)) u_cache (
      .clk, .rst_n,
      .read_cmd, .write_cmd, .non_cacheable, .address, .data_in, .be_in(be),
      .cache_ack, .data_out,
      .bo(c2b[i]), .bi(b2c[i])
    );

    assign mux_m[i+1]     = priv_ipif_m[i];
    assign priv_ipif_s[i] = mux_s[i+1];
  end

  assign c2b[NCPU] = nic_c2b;
  assign nic_b2c   = b2c[NCPU];

  coherent_bus #(.NP(NP)) u_bus (
    .clk, .rst_n,
    .ci(c2b), .co(b2c),
    .ddr_m(mux_m[0]), .ddr_s(mux_s[0])
  );

  ddr_mux #(.NI(NP)) u_ddr_mux (
    .clk, .rst_n,
    .m_in(mux_m), .s_out(mux_s),
    .ddr_m, .ddr_s
  );
endmodule
