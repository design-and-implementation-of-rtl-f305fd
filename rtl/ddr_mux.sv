// ddr_mux: shares the one IPIF port of the DDR controller among NI IPIF
// masters: the coherent interconnect and the two processors' private-memory
// bridges.
//
// Each input has an FSM_DDR_ACCESS (IDLE, PENDING, ACTIVE). A master starts
// a transfer by raising chip select with a read or write request; for a
// single transfer the request is a one-cycle pulse, so the FSM latches it
// (PENDING) and the access is not lost while another master holds the
// memory. The mux serves pending inputs in round-robin order. When an input is
// selected its transfer is replayed to the controller: chip select, address,
// byte enables and write data pass straight through, the request is
// regenerated as a one-cycle pulse in the first cycle, and for bursts the
// master's held request follows. Acknowledges and read data go only to the
// selected master; the others see none. The transfer ends when the selected
// master drops chip select; the controller then sees chip select low for one
// cycle before the next transfer (ACTIVE -> gap -> next).
//
// Follows the design: per-input FSM that remembers a request, round robin on
// chip select, regenerated request waveforms. Own choices: the one-cycle gap,
// the latched request adding one cycle before a transfer starts.
module ddr_mux
  import ccs_pkg::*;
#(
  parameter int NI = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ipif_m2s_t m_in  [NI],
  output ipif_s2m_t s_out [NI],
  output ipif_m2s_t ddr_m,
  input  ipif_s2m_t ddr_s
);
  localparam int SW = (NI > 1) ? $clog2(NI) : 1;

  typedef enum logic [1:0] {ACC_IDLE, ACC_PENDING, ACC_ACTIVE} acc_st_e;
  acc_st_e   acc_st [NI];
  logic [NI-1:0] pend_rd;     // latched request type

  typedef enum logic [1:0] {MUX_IDLE, MUX_FIRST, MUX_BUSY, MUX_GAP} mux_st_e;
  mux_st_e       mux_st;
  logic [SW-1:0] sel, last;

  // round robin among pending inputs
  logic          any_pend;
  logic [SW-1:0] next_sel;
  always_comb begin
    any_pend = 1'b0;
    next_sel = '0;
    for (int k = 1; k <= NI; k++) begin
      logic [SW-1:0] p;
      p = SW'((32'(last) + k) % NI);
      if (!any_pend && acc_st[p] == ACC_PENDING) begin
        any_pend = 1'b1;
        next_sel = p;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NI; i++) acc_st[i] <= ACC_IDLE;
      pend_rd <= '0;
      mux_st  <= MUX_IDLE;
      sel     <= '0;
      last    <= SW'(NI - 1);
    end else begin
      for (int i = 0; i < NI; i++) begin
        case (acc_st[i])
          ACC_IDLE: if (m_in[i].cs && (m_in[i].rdreq || m_in[i].wrreq)) begin
            acc_st[i]  <= ACC_PENDING;
            pend_rd[i] <= m_in[i].rdreq;
          end
          ACC_PENDING: if (mux_st == MUX_IDLE && any_pend && next_sel == SW'(i)) acc_st[i] <= ACC_ACTIVE;
          ACC_ACTIVE:  if (!m_in[i].cs) acc_st[i] <= ACC_IDLE;
          default:     acc_st[i] <= ACC_IDLE;
        endcase
      end
      case (mux_st)
        MUX_IDLE: if (any_pend) begin
          mux_st <= MUX_FIRST;
          sel    <= next_sel;
          last   <= next_sel;
        end
        MUX_FIRST: mux_st <= m_in[sel].cs ? MUX_BUSY : MUX_GAP;
        MUX_BUSY:  if (!m_in[sel].cs) mux_st <= MUX_GAP;
        MUX_GAP:   mux_st <= MUX_IDLE;
        default:   mux_st <= MUX_IDLE;
      endcase
    end
  end

  always_comb begin
    ddr_m = IPIF_M_IDLE;
    for (int i = 0; i < NI; i++) s_out[i] = IPIF_S_IDLE;
    if (mux_st == MUX_FIRST || mux_st == MUX_BUSY) begin
      ddr_m = m_in[sel];
      if (mux_st == MUX_FIRST) begin
        ddr_m.cs    = 1'b1;
        ddr_m.rdreq = pend_rd[sel];
        ddr_m.wrreq = !pend_rd[sel];
      end else begin
        ddr_m.rdreq = m_in[sel].burst && m_in[sel].rdreq;
        ddr_m.wrreq = m_in[sel].burst && m_in[sel].wrreq;
      end
      s_out[sel] = ddr_s;
    end
  end

  a_sel_active: assert property (@(posedge clk) disable iff (!rst_n)
      (mux_st == MUX_BUSY) |-> acc_st[sel] == ACC_ACTIVE)
    else $error("ddr_mux: selected input is not active");
endmodule
