// ddr_ipif_model: behavioural model of the DDR controller's IPIF slave side
// with the memory behind it, for testbenches only.
//
// A transfer starts when cs and rdreq or wrreq are seen while idle. After
// LATENCY cycles the model acknowledges: one beat for a single transfer, four
// beats on consecutive cycles for a burst, whose double-word address starts
// at addr and wraps inside the 32-byte line. Writes honour the byte enables
// (be[7] = data[63:56], the lowest address). The model then waits for cs to
// drop before it accepts another transfer. mem is public so a testbench can
// preload and inspect it. It also counts transfers by kind.
module ddr_ipif_model
  import ccs_pkg::*;
#(
  parameter int MEM_DW  = 4096,   // 64-bit words modelled (address wraps)
  parameter int LATENCY = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ipif_m2s_t m,
  output ipif_s2m_t s
);
  localparam int AW = $clog2(MEM_DW);
  logic [63:0] mem [MEM_DW];

  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_BEAT, M_END} st_e;
  st_e        st;
  logic       is_rd, is_burst;
  logic [31:0] base;
  int         wait_cnt, beat;
  int         n_single_rd, n_single_wr, n_burst_rd, n_burst_wr;

  initial for (int i = 0; i < MEM_DW; i++) mem[i] = '0;

  function automatic int dw_index(input logic [31:0] a, input int b);
    logic [31:0] x;
    x = {a[31:5], 5'b0} | {27'b0, 2'(a[4:3] + 2'(b)), 3'b0};
    return int'(x[AW+2:3]);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= M_IDLE; is_rd <= 1'b0; is_burst <= 1'b0; base <= '0; wait_cnt <= 0; beat <= 0;
      n_single_rd <= 0; n_single_wr <= 0; n_burst_rd <= 0; n_burst_wr <= 0;
    end else begin
      case (st)
        M_IDLE: if (m.cs && (m.rdreq || m.wrreq)) begin
          st <= M_WAIT; is_rd <= m.rdreq; is_burst <= m.burst; base <= m.addr;
          wait_cnt <= LATENCY; beat <= 0;
          if (m.burst) begin if (m.rdreq) n_burst_rd <= n_burst_rd + 1; else n_burst_wr <= n_burst_wr + 1; end
          else begin if (m.rdreq) n_single_rd <= n_single_rd + 1; else n_single_wr <= n_single_wr + 1; end
        end
        M_WAIT: if (wait_cnt <= 1) st <= M_BEAT; else wait_cnt <= wait_cnt - 1;
        M_BEAT: begin
          if (!is_rd) begin
            for (int k = 0; k < 8; k++)
              if (m.be[k]) mem[dw_index(base, beat)][k*8 +: 8] <= m.data[k*8 +: 8];
          end
          if (!is_burst || beat == 3) st <= M_END;
          beat <= beat + 1;
        end
        M_END: if (!m.cs) st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

  always_comb begin
    s = IPIF_S_IDLE;
    if (st == M_BEAT) begin
      s.rdack = is_rd;
      s.wrack = !is_rd;
      s.data  = is_rd ? mem[dw_index(base, beat)] : 64'h0;
    end
  end
endmodule
