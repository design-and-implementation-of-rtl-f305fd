// coherent_bus: the coherent memory interconnect. It joins NP participants
// (two caches and a port for a future network interface) to one IPIF master
// port toward the DDR memory path.
//
// Arbitration (FSM_Arb). In ARBITRATE a round-robin arbiter picks one of the
// participants whose req is high and whose message can be accepted (requests
// are masked while the queue toward memory lacks room for the message, while
// both write-back buffers are taken by a request that brings a write-back, and
// while a write-back is being gathered). gnt is given in the same cycle, and
// BusRd, BusRdX, Invalidate and Update are broadcast the same cycle (snoop_*)
// to every other participant. Only one message is on the bus at a time:
//   BusRd/BusRdX : GATHER_REPLIES collects one reply from each other
//                  participant. On a hit, POSITIVE_RESPONSE sends the block
//                  head to the requester and forwards the 8 words of the
//                  owner (11 bus cycles from grant). On a miss the read goes
//                  to memory and NULL waits for it; the block is then passed
//                  on as it arrives, critical double-word first.
//   Invalidate   : grant plus one cycle (NULL) for the snoopers: 2 cycles.
//   Update       : grant plus 8 cycles that forward the words to every other
//                  participant and to memory: 9 cycles.
//   NcWr         : grant plus one cycle (NON_CACHEABLE_WR) taking the data
//                  word and byte enables into NC_fifo: 2 cycles.
//   NcRd         : grant, wait in NULL for memory, NON_CACHEABLE_RD returns
//                  the word.
// Write-backs (FSM_BUS_WB) run beside the arbiter: a participant that was
// granted a request with wbf sends wb_start with the block address and then
// 8 words. After 4 words the write-back command is queued and wb_ack sent
// (WB_CONFIRMED); before that wb_cancel empties the buffer. There are two
// write-back buffers, each a pair of 32-bit sub-FIFOs read as 64 bits.
//
// Memory side (FSM_2_DDR). Commands leave Commands_fifo in order as IPIF
// transfers: non-cacheable accesses as single 64-bit beats with the right
// byte enables, blocks as 4-beat bursts that start at the double word of the
// address and wrap inside the 32-byte line. chip select drops for at least
// one cycle between transfers. Read data enters the DataIn sub-FIFO pair.
//
// Follows the design: the supplier of a remote hit (the first hitting
// participant after the requester in round-robin order), the arbiter states
// and the bus cycle counts of each message, round robin, no interleaving of
// messages, the 36-bit command
// queue, FIFO capacities (4 non-cacheable writes, 2 write-back blocks, 2
// Update messages), 32-to-64-bit sub-FIFO pairs, and the write-back
// confirm/cancel protocol. Own choices: every participant answers a BusRd or
// BusRdX in the cycle after the broadcast; the interconnect runs on the same
// clock as the caches; Update blocks start at word 0 of a line.
module coherent_bus
  import ccs_pkg::*;
#(
  parameter int NP             = 3,   // participants: 2 caches + network interface
  parameter int CMD_DEPTH      = 8,
  parameter int NC_DEPTH       = 4,   // non-cacheable writes held
  parameter int UPD_MSGS       = 2    // Update messages held
) (
  input  logic      clk,
  input  logic      rst_n,
  input  c2b_t      ci [NP],
  output b2c_t      co [NP],
  output ipif_m2s_t ddr_m,
  input  ipif_s2m_t ddr_s
);
  localparam int PW = (NP > 1) ? $clog2(NP) : 1;
  localparam int UPD_DW = UPD_MSGS * 4;   // double words per Update sub-FIFO pair

  typedef struct packed {
    bus_cmd_e    cmd;
    logic        buf_sel;   // write-back buffer of a Wb command
    logic [31:0] addr;
  } dcmd_t;                 // 36 bits

  // ---------------------------------------------------------------- queues
  dcmd_t cmd_din, cmd_head;
  logic  cmd_push, cmd_pop, cmd_empty, cmd_full;
  logic [$clog2(CMD_DEPTH+1)-1:0] cmd_count;
  flow_fifo #(.WIDTH($bits(dcmd_t)), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n, .clr(1'b0), .push(cmd_push), .din(cmd_din), .pop(cmd_pop),
    .dout(cmd_head), .empty(cmd_empty), .full(cmd_full), .count(cmd_count));

  logic [35:0] nc_din, nc_head;
  logic        nc_push, nc_pop, nc_empty, nc_full;
  logic [$clog2(NC_DEPTH+1)-1:0] nc_count;
  flow_fifo #(.WIDTH(36), .DEPTH(NC_DEPTH)) u_nc_fifo (
    .clk, .rst_n, .clr(1'b0), .push(nc_push), .din(nc_din), .pop(nc_pop),
    .dout(nc_head), .empty(nc_empty), .full(nc_full), .count(nc_count));

  // sub-FIFO pairs: [0] even words (high half), [1] odd words (low half)
  logic [31:0] wb_din;
  logic [1:0][1:0] wb_push, wb_pop, wb_empty, wb_full;
  logic [1:0]      wb_clr;
  logic [31:0] wb_head [2][2];
  logic [2:0]  wb_cnt  [2][2];
  for (genvar b = 0; b < 2; b++) begin : g_wbuf
    for (genvar h = 0; h < 2; h++) begin : g_half
      flow_fifo #(.WIDTH(32), .DEPTH(4)) u_wb (
        .clk, .rst_n, .clr(wb_clr[b]), .push(wb_push[b][h]), .din(wb_din), .pop(wb_pop[b][h]),
        .dout(wb_head[b][h]), .empty(wb_empty[b][h]), .full(wb_full[b][h]), .count(wb_cnt[b][h]));
    end
  end

  logic [31:0] up_din;
  logic [1:0]  up_push, up_pop, up_empty, up_full;
  logic [31:0] up_head [2];
  logic [$clog2(UPD_DW+1)-1:0] up_cnt [2];
  logic [31:0] di_din [2];
  logic [1:0]  di_push, di_pop, di_empty, di_full;
  logic [31:0] di_head [2];
  logic [2:0]  di_cnt  [2];
  for (genvar h = 0; h < 2; h++) begin : g_pair
    flow_fifo #(.WIDTH(32), .DEPTH(UPD_DW)) u_upd (
      .clk, .rst_n, .clr(1'b0), .push(up_push[h]), .din(up_din), .pop(up_pop[h]),
      .dout(up_head[h]), .empty(up_empty[h]), .full(up_full[h]), .count(up_cnt[h]));
    flow_fifo #(.WIDTH(32), .DEPTH(4)) u_din (
      .clk, .rst_n, .clr(1'b0), .push(di_push[h]), .din(di_din[h]), .pop(di_pop[h]),
      .dout(di_head[h]), .empty(di_empty[h]), .full(di_full[h]), .count(di_cnt[h]));
  end

  // ---------------------------------------------------------------- FSM_BUS_WB state
  typedef enum logic [1:0] {BUS_WB_IDLE, ACCUMULATE_DATA, WB_CONFIRMED} bwb_st_e;
  bwb_st_e        bwb_st;
  logic [PW-1:0]  bwb_src;
  logic           bwb_buf;
  logic [31:0]    bwb_addr;
  logic [3:0]     bwb_cnt;
  logic [1:0]     buf_busy, buf_ready;
  logic           wb_expect;     // a write-back was announced by a granted request
  logic           bwb_push_cmd;

  // ---------------------------------------------------------------- FSM_Arb
  typedef enum logic [2:0] {
    ARBITRATE, NON_CACHEABLE_WR, NON_CACHEABLE_RD, NULL_ST, GATHER_REPLIES, POSITIVE_RESPONSE, UPDATE
  } arb_st_e;
  arb_st_e       arb_st;
  logic [PW-1:0] owner, rr_ptr, responder;
  bus_cmd_e      cur_cmd;
  logic [31:0]   cur_addr;
  logic [3:0]    cnt;
  logic          head_sent;

  // request masking
  logic [NP-1:0] can_go;
  logic          cmd_room;
  always_comb begin
    cmd_room = (32'(cmd_count) + 2) <= CMD_DEPTH;
    for (int i = 0; i < NP; i++) begin
      can_go[i] = ci[i].req && cmd_room && (bwb_st == BUS_WB_IDLE) && !wb_expect;
      if (ci[i].cmd == CMD_NC_WR && nc_full) can_go[i] = 1'b0;
      if (ci[i].cmd == CMD_UPDATE && (32'(up_cnt[1]) + 4) > UPD_DW) can_go[i] = 1'b0;
      if (ci[i].wbf && (&buf_busy)) can_go[i] = 1'b0;
    end
  end

  // round robin starting after the last winner
  logic          any_grant;
  logic [PW-1:0] win;
  always_comb begin
    any_grant = 1'b0;
    win       = '0;
    for (int k = 1; k <= NP; k++) begin
      logic [PW-1:0] p;
      p = PW'((32'(rr_ptr) + k) % NP);
      if (!any_grant && can_go[p]) begin
        any_grant = 1'b1;
        win       = PW'(p);
      end
    end
    if (arb_st != ARBITRATE) any_grant = 1'b0;
  end

  // replies gathered one cycle after a BusRd/BusRdX broadcast; the supplier
  // is the first hitting participant after the requester in round-robin order
  logic          any_hit, all_replied;
  logic [PW-1:0] hit_idx;
  always_comb begin
    logic [PW-1:0] j;
    any_hit = 1'b0; hit_idx = '0; all_replied = 1'b1;
    for (int k = 1; k < NP; k++) begin
      j = PW'((int'(owner) + k) % NP);
      if (ci[j].snoop_hit && !any_hit) begin
        any_hit = 1'b1;
        hit_idx = j;
      end
      if (!(ci[j].snoop_hit || ci[j].snoop_miss)) all_replied = 1'b0;
    end
  end

  // data words waiting in DataIn for the word position cnt
  logic di_word_ok;
  assign di_word_ok = !di_empty[cnt[0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      arb_st <= ARBITRATE; owner <= '0; rr_ptr <= PW'(NP - 1); responder <= '0;
      cur_cmd <= CMD_NONE; cur_addr <= '0; cnt <= '0; head_sent <= 1'b0;
    end else begin
      case (arb_st)
        ARBITRATE: if (any_grant) begin
          owner     <= win;
          rr_ptr    <= win;
          cur_cmd   <= ci[win].cmd;
          cur_addr  <= ci[win].addr;
          cnt       <= '0;
          head_sent <= 1'b0;
          case (ci[win].cmd)
            CMD_BUSRD, CMD_BUSRDX: arb_st <= GATHER_REPLIES;
            CMD_UPDATE:            arb_st <= UPDATE;
            CMD_NC_WR:             arb_st <= NON_CACHEABLE_WR;
            default:               arb_st <= NULL_ST;      // Invalidate, NcRd
          endcase
        end
        GATHER_REPLIES: if (all_replied) begin
          if (any_hit) begin
            responder <= hit_idx;
            arb_st    <= POSITIVE_RESPONSE;
          end else begin
            arb_st    <= NULL_ST;
          end
        end
        POSITIVE_RESPONSE: begin
          head_sent <= 1'b1;
          if (head_sent && ci[responder].dout_valid) begin
            cnt <= cnt + 1'b1;
            if (cnt == 4'd7) arb_st <= ARBITRATE;
          end
        end
        NULL_ST: begin
          if (cur_cmd == CMD_INV) arb_st <= ARBITRATE;
          else if (!head_sent) begin
            if (!di_empty[0]) begin
              head_sent <= 1'b1;
              if (cur_cmd == CMD_NC_RD) arb_st <= NON_CACHEABLE_RD;
            end
          end else if (di_word_ok) begin
            cnt <= cnt + 1'b1;
            if (cnt == 4'd7) arb_st <= ARBITRATE;
          end
        end
        NON_CACHEABLE_RD: arb_st <= ARBITRATE;
        NON_CACHEABLE_WR: if (ci[owner].dout_valid) arb_st <= ARBITRATE;
        UPDATE: if (ci[owner].dout_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'd7) arb_st <= ARBITRATE;
        end
        default: arb_st <= ARBITRATE;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs to participants
  logic [31:0] blk_head_addr;  // head of a block read from memory: its first double word
  assign blk_head_addr = {cur_addr[31:3], 3'b000};

  always_comb begin
    for (int i = 0; i < NP; i++) co[i] = B2C_IDLE;
    di_pop = '0;
    if (any_grant) begin
      co[win].gnt = 1'b1;
      if (ci[win].cmd inside {CMD_BUSRD, CMD_BUSRDX, CMD_INV, CMD_UPDATE}) begin
        for (int i = 0; i < NP; i++) begin
          if (PW'(i) != win) begin
            co[i].snoop_valid = 1'b1;
            co[i].snoop_cmd   = ci[win].cmd;
            co[i].snoop_addr  = ci[win].addr;
          end
        end
      end
    end
    case (arb_st)
      POSITIVE_RESPONSE: begin
        if (!head_sent) begin
          co[owner].din_valid  = 1'b1;
          co[owner].din_head   = 1'b1;
          co[owner].din_shared = (cur_cmd == CMD_BUSRD);
          co[owner].din_data   = cur_addr;
        end else begin
          co[owner].din_valid  = ci[responder].dout_valid;
          co[owner].din_data   = ci[responder].dout;
        end
      end
      NULL_ST: if (cur_cmd != CMD_INV) begin
        if (!head_sent) begin
          if (!di_empty[0]) begin
            co[owner].din_valid = 1'b1;
            co[owner].din_head  = 1'b1;
            co[owner].din_nc    = (cur_cmd == CMD_NC_RD);
            co[owner].din_data  = (cur_cmd == CMD_NC_RD) ? cur_addr : blk_head_addr;
          end
        end else if (di_word_ok) begin
          co[owner].din_valid = 1'b1;
          co[owner].din_data  = di_head[cnt[0]];
          di_pop[cnt[0]]      = 1'b1;
        end
      end
      NON_CACHEABLE_RD: begin
        co[owner].din_valid = 1'b1;
        co[owner].din_data  = di_head[0];
        di_pop[0]           = 1'b1;
      end
      UPDATE: begin
        for (int i = 0; i < NP; i++) begin
          if (PW'(i) != owner) begin
            co[i].din_valid = ci[owner].dout_valid;
            co[i].din_data  = ci[owner].dout;
          end
        end
      end
      default: ;
    endcase
    if (bwb_st == ACCUMULATE_DATA && bwb_cnt == 4'd3 && ci[bwb_src].dout_valid)
      co[bwb_src].wb_ack = 1'b1;
  end

  // update words: even positions to sub-FIFO 0, odd to 1
  always_comb begin
    up_din  = ci[owner].dout;
    up_push = '0;
    if (arb_st == UPDATE && ci[owner].dout_valid) up_push[cnt[0]] = 1'b1;
    nc_din  = {ci[owner].dout_be, ci[owner].dout};
    nc_push = (arb_st == NON_CACHEABLE_WR) && ci[owner].dout_valid;
  end

  // ---------------------------------------------------------------- FSM_BUS_WB
  logic [NP-1:0] wbs;
  logic [PW-1:0] wbs_idx;
  always_comb begin
    wbs_idx = '0;
    for (int i = 0; i < NP; i++) begin
      wbs[i] = ci[i].wb_start;
      if (ci[i].wb_start) wbs_idx = PW'(i);
    end
  end

  logic free_buf;
  assign free_buf = buf_busy[0] ? 1'b1 : 1'b0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bwb_st <= BUS_WB_IDLE; bwb_src <= '0; bwb_buf <= 1'b0; bwb_addr <= '0; bwb_cnt <= '0;
      wb_expect <= 1'b0;
    end else begin
      if (any_grant && ci[win].wbf) wb_expect <= 1'b1;
      case (bwb_st)
        BUS_WB_IDLE: begin
          if (|wbs) begin
            bwb_st    <= ACCUMULATE_DATA;
            bwb_src   <= wbs_idx;
            bwb_buf   <= free_buf;
            bwb_addr  <= ci[wbs_idx].dout;
            bwb_cnt   <= '0;
            wb_expect <= 1'b0;
          end else if (wb_expect && ci[owner].wb_cancel) begin
            wb_expect <= 1'b0;
          end
        end
        ACCUMULATE_DATA: begin
          if (ci[bwb_src].wb_cancel) bwb_st <= BUS_WB_IDLE;
          else if (ci[bwb_src].dout_valid) begin
            bwb_cnt <= bwb_cnt + 1'b1;
            if (bwb_cnt == 4'd3) bwb_st <= WB_CONFIRMED;
          end
        end
        WB_CONFIRMED: if (ci[bwb_src].dout_valid) begin
          bwb_cnt <= bwb_cnt + 1'b1;
          if (bwb_cnt == 4'd7) bwb_st <= BUS_WB_IDLE;
        end
        default: bwb_st <= BUS_WB_IDLE;
      endcase
    end
  end

  always_comb begin
    wb_din  = ci[bwb_src].dout;
    wb_push = '0;
    wb_clr  = '0;
    if ((bwb_st == ACCUMULATE_DATA || bwb_st == WB_CONFIRMED) && ci[bwb_src].dout_valid &&
        !(bwb_st == ACCUMULATE_DATA && ci[bwb_src].wb_cancel))
      wb_push[bwb_buf][bwb_cnt[0]] = 1'b1;
    if (bwb_st == ACCUMULATE_DATA && ci[bwb_src].wb_cancel) wb_clr[bwb_buf] = 1'b1;
    bwb_push_cmd = (bwb_st == ACCUMULATE_DATA) && (bwb_cnt == 4'd3) &&
                   ci[bwb_src].dout_valid && !ci[bwb_src].wb_cancel;
  end

  // commands toward memory: read misses and non-cacheable/Update messages from
  // the arbiter, write-backs from FSM_BUS_WB
  logic arb_push_cmd;
  always_comb begin
    arb_push_cmd = 1'b0;
    cmd_din      = '{cmd: CMD_NONE, buf_sel: 1'b0, addr: '0};
    if (any_grant && ci[win].cmd inside {CMD_NC_RD, CMD_NC_WR, CMD_UPDATE}) begin
      arb_push_cmd = 1'b1;
      cmd_din      = '{cmd: ci[win].cmd, buf_sel: 1'b0, addr: ci[win].addr};
    end else if (arb_st == GATHER_REPLIES && all_replied && !any_hit) begin
      arb_push_cmd = 1'b1;
      cmd_din      = '{cmd: cur_cmd, buf_sel: 1'b0, addr: cur_addr};
    end
    cmd_push = arb_push_cmd || bwb_push_cmd;
    if (bwb_push_cmd) cmd_din = '{cmd: CMD_WB, buf_sel: bwb_buf, addr: bwb_addr};
  end

  // ---------------------------------------------------------------- FSM_2_DDR
  typedef enum logic [2:0] {D_IDLE, D_SINGLE_RD, D_SINGLE_WR, D_BURST_RD, D_BURST_WR, D_GAP} d_st_e;
  d_st_e      d_st;
  logic [2:0] beat;
  logic       first;

  logic hd_ready;    // data for the head command is available
  always_comb begin
    case (cmd_head.cmd)
      CMD_NC_WR:  hd_ready = !nc_empty;
      CMD_WB:     hd_ready = buf_ready[cmd_head.buf_sel];
      CMD_UPDATE: hd_ready = 32'(up_cnt[1]) >= 4;
      CMD_NC_RD:  hd_ready = di_empty[0];
      default:    hd_ready = di_empty[0] && di_empty[1];   // block read
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_st <= D_IDLE; beat <= '0; first <= 1'b0;
    end else begin
      first <= 1'b0;
      case (d_st)
        D_IDLE: if (!cmd_empty && hd_ready) begin
          first <= 1'b1;
          beat  <= '0;
          case (cmd_head.cmd)
            CMD_NC_RD:  d_st <= D_SINGLE_RD;
            CMD_NC_WR:  d_st <= D_SINGLE_WR;
            CMD_WB, CMD_UPDATE: d_st <= D_BURST_WR;
            default:    d_st <= D_BURST_RD;
          endcase
        end
        D_SINGLE_RD: if (ddr_s.rdack) d_st <= D_GAP;
        D_SINGLE_WR: if (ddr_s.wrack) d_st <= D_GAP;
        D_BURST_RD:  if (ddr_s.rdack) begin
          beat <= beat + 1'b1;
          if (beat == 3'd3) d_st <= D_GAP;
        end
        D_BURST_WR:  if (ddr_s.wrack) begin
          beat <= beat + 1'b1;
          if (beat == 3'd3) d_st <= D_GAP;
        end
        D_GAP:   d_st <= D_IDLE;
        default: d_st <= D_IDLE;
      endcase
    end
  end

  logic [3:0] nc_be;
  logic [31:0] nc_word;
  assign nc_be   = nc_head[35:32];
  assign nc_word = nc_head[31:0];

  always_comb begin
    ddr_m   = IPIF_M_IDLE;
    cmd_pop = 1'b0;
    nc_pop  = 1'b0;
    up_pop  = '0;
    wb_pop  = '0;
    di_push = '0;
    di_din[0] = ddr_s.data[63:32];
    di_din[1] = ddr_s.data[31:0];
    ddr_m.addr = {cmd_head.addr[31:3], 3'b000};
    case (d_st)
      D_SINGLE_RD: begin
        ddr_m.cs    = 1'b1;
        ddr_m.rdreq = first;
        ddr_m.be    = cmd_head.addr[2] ? 8'h0F : 8'hF0;
        if (ddr_s.rdack) begin
          di_push[0] = 1'b1;
          di_din[0]  = cmd_head.addr[2] ? ddr_s.data[31:0] : ddr_s.data[63:32];
          cmd_pop    = 1'b1;
        end
      end
      D_SINGLE_WR: begin
        ddr_m.cs    = 1'b1;
        ddr_m.wrreq = first;
        ddr_m.be    = cmd_head.addr[2] ? {4'h0, nc_be} : {nc_be, 4'h0};
        ddr_m.data  = {nc_word, nc_word};
        if (ddr_s.wrack) begin
          nc_pop  = 1'b1;
          cmd_pop = 1'b1;
        end
      end
      D_BURST_RD: begin
        ddr_m.cs    = 1'b1;
        ddr_m.rdreq = 1'b1;
        ddr_m.burst = 1'b1;
        ddr_m.be    = 8'hFF;
        if (ddr_s.rdack) begin
          di_push = 2'b11;
          if (beat == 3'd3) cmd_pop = 1'b1;
        end
      end
      D_BURST_WR: begin
        ddr_m.cs    = 1'b1;
        ddr_m.wrreq = 1'b1;
        ddr_m.burst = 1'b1;
        ddr_m.be    = 8'hFF;
        if (cmd_head.cmd == CMD_WB) begin
          ddr_m.data = {wb_head[cmd_head.buf_sel][0], wb_head[cmd_head.buf_sel][1]};
          if (ddr_s.wrack) wb_pop[cmd_head.buf_sel] = 2'b11;
        end else begin
          ddr_m.data = {up_head[0], up_head[1]};
          if (ddr_s.wrack) up_pop = 2'b11;
        end
        if (ddr_s.wrack && beat == 3'd3) cmd_pop = 1'b1;
      end
      default: ;
    endcase
  end

  // write-back buffer ownership
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_busy  <= '0;
      buf_ready <= '0;
    end else begin
      if (bwb_st == BUS_WB_IDLE && (|wbs)) buf_busy[free_buf] <= 1'b1;
      if (bwb_st == ACCUMULATE_DATA && ci[bwb_src].wb_cancel) buf_busy[bwb_buf] <= 1'b0;
      if (bwb_st == WB_CONFIRMED && ci[bwb_src].dout_valid && bwb_cnt == 4'd7) buf_ready[bwb_buf] <= 1'b1;
      if (d_st == D_BURST_WR && cmd_head.cmd == CMD_WB && ddr_s.wrack && beat == 3'd3) begin
        buf_busy[cmd_head.buf_sel]  <= 1'b0;
        buf_ready[cmd_head.buf_sel] <= 1'b0;
      end
    end
  end

  a_one_cmd_push: assert property (@(posedge clk) disable iff (!rst_n) !(arb_push_cmd && bwb_push_cmd))
    else $error("coherent_bus: two commands queued in one cycle");
  a_cmd_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cmd_push |-> !cmd_full)
    else $error("coherent_bus: command queue overflow");
  a_wb_buf_free: assert property (@(posedge clk) disable iff (!rst_n) (bwb_st == BUS_WB_IDLE && (|wbs)) |-> !(&buf_busy))
    else $error("coherent_bus: write-back with no free buffer");
  a_nc_room: assert property (@(posedge clk) disable iff (!rst_n) nc_push |-> !nc_full)
    else $error("coherent_bus: NC_fifo overflow");
  a_din_room: assert property (@(posedge clk) disable iff (!rst_n) (|di_push) |-> !(|di_full))
    else $error("coherent_bus: DataIn overflow");
  a_wb_room: assert property (@(posedge clk) disable iff (!rst_n)
      (|wb_push) |-> !(wb_full[bwb_buf][bwb_cnt[0]]) && (32'(wb_cnt[bwb_buf][0]) + 32'(wb_cnt[bwb_buf][1]) < 8))
    else $error("coherent_bus: write-back buffer overflow");
  a_wb_data: assert property (@(posedge clk) disable iff (!rst_n) !(|(wb_pop & wb_empty)))
    else $error("coherent_bus: write-back buffer underflow");
  a_upd_room: assert property (@(posedge clk) disable iff (!rst_n) !(|(up_push & up_full)) && !(|(up_pop & up_empty)))
    else $error("coherent_bus: Update FIFO overflow or underflow");
  a_nc_count: assert property (@(posedge clk) disable iff (!rst_n) 32'(nc_count) <= NC_DEPTH)
    else $error("coherent_bus: NC_fifo count out of range");
  a_din_count: assert property (@(posedge clk) disable iff (!rst_n) (32'(di_cnt[0]) <= 4) && (32'(di_cnt[1]) <= 4))
    else $error("coherent_bus: DataIn count out of range");
endmodule
