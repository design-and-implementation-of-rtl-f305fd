// plb2cache: request filter between one processor's data-side PLB master
// (DCU) and its coherent cache.
//
// Addresses inside the shared window (SHARED_BASE/SHARED_MASK) are taken by
// this block; all others go on to the processor's PLB bus unchanged (the
// request is gated off for shared addresses and the PLB's answers are passed
// back). Inside the shared window a sub-range (NC_BASE/NC_MASK) is
// non-cacheable and goes to memory through the interconnect.
//
// FSM_PLB accepts a shared access in the cycle it appears (addrack) when the
// request FIFO has room for two entries. A read puts one entry in the FIFO; a
// write puts its address entry in at once and its data entry in the next
// cycle, where wrdack ends the write: a shared write takes 2 cycles on the PLB
// whatever the cache does with it. FSM_ACCESS takes FIFO entries in order and
// drives the cache's Read_Cmd/Write_Cmd, Address, Data_In, byte enables and
// Non_cacheable, holding them until the cache's one-cycle Cache_Ack. The word
// read is returned to the processor on rddbus (both halves) in the cycle after
// Cache_Ack; a read hit is therefore 3 cycles from request to rddack. If the
// PLB is delivering read data in that cycle the shared data waits.
// busy is raised while shared work is outstanding or the PLB reports busy.
//
// Follows the design: two FSMs, 16-word FIFO with one word per read and two
// per write, address acknowledge in the first cycle, 2-cycle writes,
// forwarding of private traffic, non-cacheable sub-range selected by
// upper address bits, waiting for the PLB's read data before returning shared
// data. Own choices: the window addresses, one outstanding word per entry,
// the FIFO read by the cache without a register stage.
module plb2cache
  import ccs_pkg::*;
#(
  parameter logic [31:0] SHARED_BASE = 32'h0100_0000,
  parameter logic [31:0] SHARED_MASK = 32'hFF00_0000,
  parameter logic [31:0] NC_BASE     = 32'h01F0_0000,
  parameter logic [31:0] NC_MASK     = 32'hFFF0_0000,
  parameter int          FIFO_DEPTH  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor DCU
  input  dcu_m2s_t    dcu_m,
  output dcu_s2m_t    dcu_s,
  // processor's PLB bus (private memory, peripherals)
  output dcu_m2s_t    plb_m,
  input  dcu_s2m_t    plb_s,
  // coherent cache
  output logic        read_cmd,
  output logic        write_cmd,
  output logic        non_cacheable,
  output logic [31:0] address,
  output logic [31:0] data_in,
  output logic [3:0]  be_out,
  input  logic        cache_ack,
  input  logic [31:0] data_out
);
  typedef enum logic [1:0] {E_RD, E_WA, E_WD} ekind_e;
  typedef struct packed {
    ekind_e      kind;
    logic        nc;
    logic [3:0]  be;
    logic [31:0] data;   // address (E_RD, E_WA) or write data (E_WD)
  } entry_t;

  entry_t f_din, f_head;
  logic   f_push, f_pop, f_empty, f_full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
  flow_fifo #(.WIDTH($bits(entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(1'b0), .push(f_push), .din(f_din), .pop(f_pop), .dout(f_head),
    .empty(f_empty), .full(f_full), .count(f_count));

  logic shared, nc_range, room;
  assign shared   = (dcu_m.abus & SHARED_MASK) == SHARED_BASE;
  assign nc_range = (dcu_m.abus & NC_MASK) == NC_BASE;
  assign room     = (32'(f_count) + 2) <= FIFO_DEPTH;

  // ---------------------------------------------------------------- FSM_PLB
  typedef enum logic {PLB_IDLE, PLB_WDATA} plb_st_e;
  plb_st_e plb_st;
  logic    wsel;          // word lane of the accepted write
  logic    take;

  assign take = (plb_st == PLB_IDLE) && dcu_m.request && shared && room;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      plb_st <= PLB_IDLE;
      wsel   <= 1'b0;
    end else begin
      case (plb_st)
        PLB_IDLE:  if (take && !dcu_m.rnw) begin
          plb_st <= PLB_WDATA;
          wsel   <= dcu_m.abus[2];
        end
        PLB_WDATA: plb_st <= PLB_IDLE;
        default:   plb_st <= PLB_IDLE;
      endcase
    end
  end

  always_comb begin
    f_push = 1'b0;
    f_din  = '{kind: dcu_m.rnw ? E_RD : E_WA, nc: nc_range,
               be: dcu_m.abus[2] ? dcu_m.be[3:0] : dcu_m.be[7:4], data: dcu_m.abus};
    if (take) f_push = 1'b1;
    if (plb_st == PLB_WDATA) begin
      f_push = 1'b1;
      f_din  = '{kind: E_WD, nc: 1'b0, be: 4'h0,
                 data: wsel ? dcu_m.wrdbus[31:0] : dcu_m.wrdbus[63:32]};
    end
  end

  // ---------------------------------------------------------------- FSM_ACCESS
  typedef enum logic [1:0] {ACC_IDLE, ACC_WRITE, ACC_RETURN} acc_st_e;
  acc_st_e     acc_st;
  logic [31:0] wa_addr;
  logic [3:0]  wa_be;
  logic        wa_nc;
  logic [31:0] ret_word;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_st <= ACC_IDLE; wa_addr <= '0; wa_be <= '0; wa_nc <= 1'b0; ret_word <= '0;
    end else begin
      case (acc_st)
        ACC_IDLE: if (!f_empty) begin
          if (f_head.kind == E_WA) begin
            acc_st  <= ACC_WRITE;
            wa_addr <= f_head.data;
            wa_be   <= f_head.be;
            wa_nc   <= f_head.nc;
          end else if (f_head.kind == E_RD && cache_ack) begin
            acc_st   <= ACC_RETURN;
            ret_word <= data_out;
          end
        end
        ACC_WRITE:  if (cache_ack) acc_st <= ACC_IDLE;
        ACC_RETURN: if (!plb_s.rddack) acc_st <= ACC_IDLE;
        default:    acc_st <= ACC_IDLE;
      endcase
    end
  end

  always_comb begin
    read_cmd      = 1'b0;
    write_cmd     = 1'b0;
    non_cacheable = f_head.nc;
    address       = f_head.data;
    data_in       = f_head.data;
    be_out        = wa_be;
    f_pop         = 1'b0;
    case (acc_st)
      ACC_IDLE: if (!f_empty) begin
        if (f_head.kind == E_RD) begin
          read_cmd = 1'b1;
          f_pop    = cache_ack;
        end else if (f_head.kind == E_WA) begin
          f_pop    = 1'b1;
        end
      end
      ACC_WRITE: begin
        address       = wa_addr;
        non_cacheable = wa_nc;
        if (!f_empty && f_head.kind == E_WD) begin
          write_cmd = 1'b1;
          f_pop     = cache_ack;
        end
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- PLB side
  always_comb begin
    plb_m         = dcu_m;
    plb_m.request = dcu_m.request && !shared;
    dcu_s         = plb_s;
    dcu_s.addrack = plb_s.addrack || take;
    dcu_s.wrdack  = plb_s.wrdack || (plb_st == PLB_WDATA);
    dcu_s.busy    = plb_s.busy || !f_empty || (acc_st != ACC_IDLE) || (plb_st != PLB_IDLE);
    if (acc_st == ACC_RETURN && !plb_s.rddack) begin
      dcu_s.rddack = 1'b1;
      dcu_s.rddbus = {ret_word, ret_word};
    end
  end

  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n) f_push |-> !f_full)
    else $error("plb2cache: request FIFO overflow");
  a_write_pairs: assert property (@(posedge clk) disable iff (!rst_n)
      (acc_st == ACC_WRITE && !f_empty) |-> f_head.kind == E_WD)
    else $error("plb2cache: write address without its data");
endmodule
