// coherent_cache: 2-way set-associative, write-back, MESI snooping cache with
// 8-word lines, placed between one processor's shared-memory path and the
// coherent interconnect.
//
// Processor side ("part A"). FSM_CPU_ACCESS takes one access at a time from
// the request filter (read_cmd/write_cmd, address, data_in, be_in,
// non_cacheable; all held until cache_ack). A cacheable access reads the data
// memory in its first cycle (CPU_READ_TAGS) and compares both tags in the
// second (CHECK_EQUALITY); a hit ends there, with cache_ack high for one cycle
// and, for a read, the word on data_out: a hit takes 2 cycles. A read miss
// sends BusRd and a write miss BusRdX (state MISS_BLOCK); a write to a Shared
// line sends Invalidate (MISS_COHERENCE). Non-cacheable reads and writes go
// straight to the bus (NC_RD, NC_WR). On a miss the victim is an invalid way
// if there is one, otherwise the way not used last (one LRU bit per set). A
// dirty victim is read out by WB_FSM, one word per cycle starting at the even
// word at or below the missed offset, and follows the miss request on the
// bus; the write-back can be cancelled while a snooped BusRdX, Invalidate or
// Update hits the victim before the write-back has started on the bus.
//
// Bus side ("part B"). BUS_FSM sends the queued messages of part A: it
// requests the bus (req), and on gnt sends the non-cacheable write word or the
// write-back (address with wb_start, then 8 words). An Invalidate whose line
// was lost to a snooped BusRdX/Invalidate while it waited is turned into a
// BusRdX (BUS_CHECK_CMD). An Invalidate is complete when granted; the line is
// then raised to Exclusive and the waiting write retried. FSM_REQ_IN snoops:
// BusRd hitting a line replies snoop_hit, demotes it to Shared and sends the
// 8 words starting at the requested one; BusRdX does the same and invalidates;
// Invalidate invalidates; Update overwrites the line's 8 words and clears its
// dirty bit without changing its state. A miss on BusRd/BusRdX replies
// snoop_miss. It also receives refills (head word then 8 words, written into
// the victim way as Exclusive, Shared or, for a write miss, Modified with the
// processor's bytes merged in) and non-cacheable read data. The requested word
// of a refill is caught in ReturnData and completes the access as soon as it
// arrives (critical word first / early restart).
//
// Dependency check: while part B refills or updates a line it publishes the
// line address and eight per-word valid bits; a processor access to that line
// waits for its word. A processor write that meets a part-B tag change of the
// same set in the same cycle is retried from CPU_READ_TAGS.
//
// Follows the design: the MESI transitions and the bus messages of each case,
// the FSMs and their states, 2 ways, 8-word lines, LRU bit, write-back with
// cancellation, critical-word-first refill, the Update message, and the
// 2-cycle hit. This implementation's own choices: a single clock for both
// parts (the design ran part B on the inverted clock), tags and states held in
// registers rather than block RAM, the retry rule for same-set races, a
// BusRd-demoted Modified line keeping its dirty bit so that it is still
// written back on eviction, and the bundle and timing of the bus port.
module coherent_cache
  import ccs_pkg::*;
#(
  parameter int CACHE_BYTES    = 4096,
  parameter int OUT_FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor side (from the request filter)
  input  logic        read_cmd,
  input  logic        write_cmd,
  input  logic        non_cacheable,
  input  logic [31:0] address,
  input  logic [31:0] data_in,
  input  logic [3:0]  be_in,
  output logic        cache_ack,
  output logic [31:0] data_out,
  // bus side
  output c2b_t        bo,
  input  b2c_t        bi
);
  localparam int SETS  = CACHE_BYTES / (LINE_BYTES * 2);
  localparam int IDX_W = $clog2(SETS);
  localparam int TAG_W = 32 - 5 - IDX_W;
  localparam int BLK_W = 27;               // address bits above the line offset
  localparam int RAM_DEPTH = SETS * WORDS_PER_LINE;
  localparam int RAW = $clog2(RAM_DEPTH);

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [OFF_W-1:0] off_t;


  // ---------------------------------------------------------------- tags
  tag_t  tag_q   [2][SETS];
  mesi_e st_q    [2][SETS];
  logic  dirty_q [2][SETS];
  logic  lru_q   [SETS];     // way used last in the set

  // part-B tag write port (has priority)
  logic  b_tag_we;  idx_t b_tag_idx; logic b_tag_way; tag_t b_tag_tag;
  mesi_e b_tag_st;  logic b_tag_dirty; logic b_lru_we;
  // part-A tag write port
  logic  a_tag_we;  logic a_lru_we;  logic a_way_sel;

  // ---------------------------------------------------------------- outgoing queue
  typedef enum logic [1:0] {K_REQ, K_NCDATA, K_WBADDR, K_WBDATA} okind_e;
  typedef struct packed {
    okind_e      kind;
    bus_cmd_e    cmd;
    logic        wbf;    // a write-back follows this request
    logic [3:0]  be;
    logic [31:0] data;
  } oentry_t;

  oentry_t of_din, of_head;
  logic    of_push, of_pop, of_empty, of_full;
  logic [$clog2(OUT_FIFO_DEPTH+1)-1:0] of_count;

  flow_fifo #(.WIDTH($bits(oentry_t)), .DEPTH(OUT_FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .clr(1'b0),
    .push(of_push), .din(of_din), .pop(of_pop), .dout(of_head),
    .empty(of_empty), .full(of_full), .count(of_count)
  );

  // ---------------------------------------------------------------- data memories
  logic            ra_en, rb_en;
  logic [1:0][3:0] ra_we;
  logic [1:0]      rb_we;
  logic [RAW-1:0]  ra_addr, rb_addr;
  logic [31:0]     ra_wdata, rb_wdata;
  logic [31:0]     ra_rdata [2];
  logic [31:0]     rb_rdata [2];

  for (genvar w = 0; w < 2; w++) begin : g_way
    cache_data_ram #(.DEPTH(RAM_DEPTH)) u_data (
      .clk,
      .a_en(ra_en), .a_we(ra_we[w]), .a_addr(ra_addr), .a_wdata(ra_wdata), .a_rdata(ra_rdata[w]),
      .b_en(rb_en), .b_we(rb_we[w]), .b_addr(rb_addr), .b_wdata(rb_wdata), .b_rdata(rb_rdata[w])
    );
  end

  // ---------------------------------------------------------------- part A state
  typedef enum logic [2:0] {
    CPU_READ_TAGS, CHECK_EQUALITY, MISS_BLOCK, MISS_COHERENCE, NC_RD, NC_WR
  } cpu_st_e;
  typedef enum logic [2:0] {WB_IDLE, WB_REQ, WB_EVICT, WB_EVICT_ACK, WB_WAIT_ACK} wb_st_e;

  cpu_st_e cpu_st;
  wb_st_e  wb_st;
  logic    nc_data_pushed;

  // outstanding miss, seen by part B
  logic [31:2] mi_addr;
  logic        mi_way, mi_merge;
  logic [31:0] mi_wdata;
  logic [3:0]  mi_be;

  // write-back bookkeeping
  logic             wb_way;
  logic [BLK_W-1:0] wb_blk;
  off_t             wb_start_off;
  logic [3:0]       wb_push_cnt;
  logic             wb_pending, wb_cancel_r;

  // part B -> part A
  logic        fill_active_q, fill_active_d;
  logic [BLK_W-1:0] fill_blk_q;
  logic [7:0]  fill_vbits_q, fill_vbits_d;
  logic [31:0] return_data;
  logic        miss_ready, nc_valid, req_done, nc_sent;
  logic        a_issue;  // part A queues a new request

  // ---------------------------------------------------------------- part A compare
  idx_t a_idx;  tag_t a_tag;  off_t a_off;
  logic a_eq0, a_eq1, a_hit0, a_hit1, a_hit, a_hway;
  mesi_e a_hst;
  logic a_victim, a_victim_dirty, a_fill_stall, a_fill_set, a_conflict;
  idx_t s_idx;  tag_t s_tag;      // index and tag of the snooped address
  logic snoop_tag_we;             // a snoop changes a tag this cycle

  assign a_idx = address[5 +: IDX_W];
  assign a_tag = address[31 -: TAG_W];
  assign a_off = address[4:2];

  tag_equal #(.W(TAG_W)) u_eq_a0 (.a(tag_q[0][a_idx]), .b(a_tag), .eq(a_eq0));
  tag_equal #(.W(TAG_W)) u_eq_a1 (.a(tag_q[1][a_idx]), .b(a_tag), .eq(a_eq1));

  assign a_hit0 = a_eq0 && (st_q[0][a_idx] != ST_I);
  assign a_hit1 = a_eq1 && (st_q[1][a_idx] != ST_I);
  assign a_hit  = a_hit0 || a_hit1;
  assign a_hway = a_hit1;
  assign a_hst  = st_q[a_hway][a_idx];

  always_comb begin
    if (st_q[0][a_idx] == ST_I)      a_victim = 1'b0;
    else if (st_q[1][a_idx] == ST_I) a_victim = 1'b1;
    else                             a_victim = ~lru_q[a_idx];
  end
  assign a_victim_dirty = (st_q[a_victim][a_idx] != ST_I) && dirty_q[a_victim][a_idx];

  // dependency check: a word of a line being refilled/updated is not there yet
  assign a_fill_stall = (fill_active_q || fill_active_d) && (fill_blk_q == address[31:5])
                        && !fill_vbits_d[a_off];
  // Only snoop-driven tag writes can meet CHECK_EQUALITY: a refill head
  // arrives while part A waits in MISS_BLOCK, and the Invalidate upgrade while
  // it waits in MISS_COHERENCE.
  // A miss into a set whose line is still being filled waits too, so that the
  // victim choice never falls on a line that is only partly written.
  assign a_fill_set   = (fill_active_q || fill_active_d) && (fill_blk_q[IDX_W-1:0] == a_idx);
  assign a_conflict   = a_fill_stall || (snoop_tag_we && s_idx == a_idx) || (a_fill_set && !a_hit);

  logic a_go;
  assign a_go = (read_cmd || write_cmd) && (wb_st == WB_IDLE) && !wb_cancel_r;

  // ---------------------------------------------------------------- part A FSM
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cpu_st <= CPU_READ_TAGS;
      nc_data_pushed <= 1'b0;
      mi_addr <= '0; mi_way <= 1'b0; mi_merge <= 1'b0; mi_wdata <= '0; mi_be <= '0;
    end else begin
      case (cpu_st)
        CPU_READ_TAGS: if (a_go) begin
          if (non_cacheable) begin
            cpu_st <= read_cmd ? NC_RD : NC_WR;
            nc_data_pushed <= 1'b0;
          end else begin
            cpu_st <= CHECK_EQUALITY;
          end
        end
        CHECK_EQUALITY: begin
          if (a_conflict)                                   cpu_st <= CPU_READ_TAGS;
          else if (a_hit && (read_cmd || a_hst == ST_E || a_hst == ST_M))
                                                            cpu_st <= CPU_READ_TAGS;
          else if (a_hit) begin                             // write to a Shared line
            cpu_st   <= MISS_COHERENCE;
            mi_addr  <= address[31:2]; mi_way <= a_hway; mi_merge <= 1'b0;
          end else begin                                    // line absent
            cpu_st   <= MISS_BLOCK;
            mi_addr  <= address[31:2]; mi_way <= a_victim; mi_merge <= write_cmd;
            mi_wdata <= data_in; mi_be <= be_in;
          end
        end
        MISS_BLOCK:     if (miss_ready) cpu_st <= CPU_READ_TAGS;
        MISS_COHERENCE: if (req_done)   cpu_st <= CPU_READ_TAGS;
        NC_RD:          if (nc_valid)   cpu_st <= CPU_READ_TAGS;
        NC_WR: begin
          nc_data_pushed <= 1'b1;
          if (nc_sent) cpu_st <= CPU_READ_TAGS;
        end
        default: cpu_st <= CPU_READ_TAGS;
      endcase
    end
  end

  logic a_hit_done;
  assign a_hit_done = (cpu_st == CHECK_EQUALITY) && !a_conflict && a_hit &&
                      (read_cmd || a_hst == ST_E || a_hst == ST_M);

  always_comb begin
    cache_ack = 1'b0;
    data_out  = return_data;
    case (cpu_st)
      CHECK_EQUALITY: begin
        cache_ack = a_hit_done;
        data_out  = ra_rdata[a_hway];
      end
      MISS_BLOCK: cache_ack = miss_ready;
      NC_RD:      cache_ack = nc_valid;
      NC_WR:      cache_ack = nc_sent;
      default: ;
    endcase
  end

  assign a_tag_we  = a_hit_done && write_cmd;
  assign a_lru_we  = a_hit_done;
  assign a_way_sel = a_hway;

  // ---------------------------------------------------------------- WB_FSM
  logic wb_start_now;
  assign wb_start_now = (cpu_st == CHECK_EQUALITY) && !a_conflict && !a_hit && a_victim_dirty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_st <= WB_IDLE; wb_way <= 1'b0; wb_blk <= '0; wb_start_off <= '0; wb_push_cnt <= '0;
    end else begin
      case (wb_st)
        WB_IDLE: if (wb_start_now) begin
          wb_st        <= WB_REQ;
          wb_way       <= a_victim;
          wb_blk       <= {tag_q[a_victim][a_idx], a_idx};
          wb_start_off <= {a_off[2:1], 1'b0};
          wb_push_cnt  <= '0;
        end
        WB_REQ: wb_st <= WB_EVICT;
        WB_EVICT: begin
          if (wb_cancel_r) wb_st <= WB_IDLE;
          else begin
            wb_push_cnt <= wb_push_cnt + 1'b1;
            if (wb_push_cnt == 4'd7) wb_st <= bi.wb_ack ? WB_IDLE : WB_WAIT_ACK;
            else if (bi.wb_ack)      wb_st <= WB_EVICT_ACK;
          end
        end
        WB_EVICT_ACK: begin
          wb_push_cnt <= wb_push_cnt + 1'b1;
          if (wb_push_cnt == 4'd7) wb_st <= WB_IDLE;
        end
        WB_WAIT_ACK: if (bi.wb_ack || wb_cancel_r) wb_st <= WB_IDLE;
        default: wb_st <= WB_IDLE;
      endcase
    end
  end

  logic wb_pushing;
  assign wb_pushing = ((wb_st == WB_EVICT) && !wb_cancel_r) || (wb_st == WB_EVICT_ACK);

  // ---------------------------------------------------------------- port A of data memory
  always_comb begin
    ra_en = 1'b0; ra_we = '0; ra_addr = {a_idx, a_off}; ra_wdata = data_in;
    if (wb_st == WB_REQ) begin
      ra_en   = 1'b1;
      ra_addr = {wb_blk[IDX_W-1:0], wb_start_off};
    end else if (wb_pushing) begin
      ra_en   = wb_push_cnt != 4'd7;
      ra_addr = {wb_blk[IDX_W-1:0], off_t'(wb_start_off + wb_push_cnt[2:0] + 3'd1)};
    end else if (cpu_st == CPU_READ_TAGS && a_go && !non_cacheable) begin
      ra_en = 1'b1;
    end else if (a_tag_we) begin
      ra_en = 1'b1;
      ra_we[a_hway] = be_in;
    end
  end

  // ---------------------------------------------------------------- queue writes (part A and WB_FSM)
  always_comb begin
    of_push = 1'b0;
    of_din  = '{kind: K_REQ, cmd: CMD_NONE, wbf: 1'b0, be: be_in, data: address};
    a_issue = 1'b0;
    if (cpu_st == CPU_READ_TAGS && a_go && non_cacheable) begin
      of_push = 1'b1; a_issue = 1'b1;
      of_din.cmd = read_cmd ? CMD_NC_RD : CMD_NC_WR;
    end else if (cpu_st == CHECK_EQUALITY && !a_conflict && !a_hit_done) begin
      of_push = 1'b1; a_issue = 1'b1;
      if (a_hit)          of_din.cmd = CMD_INV;
      else if (write_cmd) of_din.cmd = CMD_BUSRDX;
      else                of_din.cmd = CMD_BUSRD;
      of_din.wbf = !a_hit && a_victim_dirty;
    end else if (cpu_st == NC_WR && !nc_data_pushed) begin
      of_push = 1'b1;
      of_din  = '{kind: K_NCDATA, cmd: CMD_NC_WR, wbf: 1'b0, be: be_in, data: data_in};
    end else if (wb_st == WB_REQ) begin
      of_push = 1'b1;
      of_din  = '{kind: K_WBADDR, cmd: CMD_WB, wbf: 1'b0, be: 4'hF,
                  data: {wb_blk, wb_start_off, 2'b00}};
    end else if (wb_pushing) begin
      of_push = 1'b1;
      of_din  = '{kind: K_WBDATA, cmd: CMD_WB, wbf: 1'b0, be: 4'hF, data: ra_rdata[wb_way]};
    end
  end

  // ---------------------------------------------------------------- part B: FSM_REQ_IN
  typedef enum logic [2:0] {BUS_RD_TAGS, BUS_CHECK_EQ, POS_RESPONSE, UPDATE, FETCH, NC_READ} rin_st_e;
  rin_st_e     rin_st;
  bus_cmd_e    s_cmd;
  logic [31:2] s_addr;
  logic        s_way;
  off_t        r_off;
  logic [3:0]  r_cnt;
  logic        rsp_vld_q;
  logic        snp_inv_q;

  logic b_eq0, b_eq1, b_hit, b_hway;
  mesi_e b_hst;
  assign s_idx = s_addr[5 +: IDX_W];
  assign s_tag = s_addr[31 -: TAG_W];
  tag_equal #(.W(TAG_W)) u_eq_b0 (.a(tag_q[0][s_idx]), .b(s_tag), .eq(b_eq0));
  tag_equal #(.W(TAG_W)) u_eq_b1 (.a(tag_q[1][s_idx]), .b(s_tag), .eq(b_eq1));
  assign b_hway = b_eq1 && (st_q[1][s_idx] != ST_I);
  assign b_hit  = (b_eq0 && (st_q[0][s_idx] != ST_I)) || b_hway;
  assign b_hst  = st_q[b_hway][s_idx];

  logic snoop_is_rd, snoop_kills, wb_victim_hit;
  assign snoop_is_rd   = (s_cmd == CMD_BUSRD) || (s_cmd == CMD_BUSRDX);
  assign snoop_kills   = (s_cmd == CMD_BUSRDX) || (s_cmd == CMD_INV) || (s_cmd == CMD_UPDATE);
  assign wb_victim_hit = (rin_st == BUS_CHECK_EQ) && b_hit && snoop_kills && wb_pending &&
                         (s_addr[31:5] == wb_blk);

  // the refill in progress, latched from the outstanding miss at its head
  // word: part A may take its next access (and start its next miss) as soon as
  // the critical word is in, while the rest of the line still streams in
  logic        f_way, f_merge, f_for_coh;
  off_t        f_tgt;
  logic [31:0] f_wdata;
  logic [3:0]  f_be;

  off_t f_off;   // offset of the incoming refill/update word
  assign f_off = off_t'(r_off + r_cnt[2:0]);

  logic [31:0] fetch_word;
  assign fetch_word = (f_merge && f_off == f_tgt) ? merge_be(bi.din_data, f_wdata, f_be)
                                                            : bi.din_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rin_st <= BUS_RD_TAGS; s_cmd <= CMD_NONE; s_addr <= '0; s_way <= 1'b0;
      r_off <= '0; r_cnt <= '0; rsp_vld_q <= 1'b0; snp_inv_q <= 1'b0;
      fill_active_q <= 1'b0; fill_blk_q <= '0; fill_vbits_q <= '0;
      f_way <= 1'b0; f_merge <= 1'b0; f_for_coh <= 1'b0; f_tgt <= '0; f_wdata <= '0; f_be <= '0;
      return_data <= '0; miss_ready <= 1'b0; nc_valid <= 1'b0;
    end else begin
      rsp_vld_q <= (rin_st == POS_RESPONSE) && (r_cnt != 4'd8);
      snp_inv_q <= (rin_st == BUS_CHECK_EQ) && ((s_cmd == CMD_INV) || (s_cmd == CMD_BUSRDX));
      if (a_issue) begin
        miss_ready <= 1'b0;
        nc_valid   <= 1'b0;
      end
      case (rin_st)
        BUS_RD_TAGS: begin
          if (bi.snoop_valid) begin
            s_cmd  <= bi.snoop_cmd;
            s_addr <= bi.snoop_addr[31:2];
            rin_st <= BUS_CHECK_EQ;
          end else if (bi.din_valid && bi.din_head) begin
            if (bi.din_nc) rin_st <= NC_READ;
            else begin
              rin_st        <= FETCH;
              r_off         <= bi.din_data[4:2];
              r_cnt         <= '0;
              fill_active_q <= 1'b1;
              fill_blk_q    <= bi.din_data[31:5];
              fill_vbits_q  <= '0;
              f_way         <= mi_way;
              f_merge       <= mi_merge;
              f_tgt         <= mi_addr[4:2];
              f_wdata       <= mi_wdata;
              f_be          <= mi_be;
              f_for_coh     <= (cpu_st == MISS_COHERENCE);
            end
          end
        end
        BUS_CHECK_EQ: begin
          s_way  <= b_hway;
          r_off  <= s_addr[4:2];
          r_cnt  <= '0;
          rin_st <= BUS_RD_TAGS;
          if (b_hit && snoop_is_rd) rin_st <= POS_RESPONSE;
          if (b_hit && s_cmd == CMD_UPDATE) begin
            rin_st        <= UPDATE;
            fill_active_q <= 1'b1;
            fill_blk_q    <= s_addr[31:5];
            fill_vbits_q  <= '0;
            if (bi.din_valid && !bi.din_head) begin
              fill_vbits_q[s_addr[4:2]] <= 1'b1;
              r_cnt <= 4'd1;
            end
          end
        end
        POS_RESPONSE: begin
          if (r_cnt == 4'd8) rin_st <= BUS_RD_TAGS;
          else               r_cnt  <= r_cnt + 1'b1;
        end
        UPDATE, FETCH: if (bi.din_valid && !bi.din_head) begin
          fill_vbits_q[f_off] <= 1'b1;
          r_cnt <= r_cnt + 1'b1;
          if (rin_st == FETCH && f_off == f_tgt && !f_for_coh) begin
            return_data <= fetch_word;
            miss_ready  <= 1'b1;
          end
          if (r_cnt == 4'd7) begin
            rin_st        <= BUS_RD_TAGS;
            fill_active_q <= 1'b0;
          end
        end
        NC_READ: if (bi.din_valid && !bi.din_head) begin
          return_data <= bi.din_data;
          nc_valid    <= 1'b1;
          rin_st      <= BUS_RD_TAGS;
        end
        default: rin_st <= BUS_RD_TAGS;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill_active_d <= 1'b0;
      fill_vbits_d  <= '0;
    end else begin
      fill_active_d <= fill_active_q;
      fill_vbits_d  <= fill_vbits_q;
    end
  end

  // port B of the data memories
  always_comb begin
    rb_en = 1'b0; rb_we = '0; rb_addr = {s_idx, off_t'(r_off + r_cnt[2:0])}; rb_wdata = bi.din_data;
    case (rin_st)
      POS_RESPONSE: rb_en = (r_cnt != 4'd8);
      BUS_CHECK_EQ: if (b_hit && s_cmd == CMD_UPDATE && bi.din_valid && !bi.din_head) begin
        rb_en = 1'b1; rb_we[b_hway] = 1'b1; rb_addr = {s_idx, s_addr[4:2]};
      end
      UPDATE: if (bi.din_valid && !bi.din_head) begin
        rb_en = 1'b1; rb_we[s_way] = 1'b1;
      end
      FETCH: if (bi.din_valid && !bi.din_head) begin
        rb_en = 1'b1; rb_we[f_way] = 1'b1;
        rb_addr = {fill_blk_q[IDX_W-1:0], f_off}; rb_wdata = fetch_word;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- part B: BUS_FSM
  typedef enum logic [2:0] {BUS_IDLE, BUS_CHECK_CMD, BUS_SEND_CMD, BUS_SEND_WB_ADDR, BUS_SEND_WB_DATA} bus_st_e;
  bus_st_e  bus_st;
  logic     conv_rdx;      // send the queued Invalidate as BusRdX
  bus_cmd_e sent_cmd;
  logic [3:0] wb_sent_cnt;

  logic c_eq0, c_eq1, c_present, c_way;
  tag_equal #(.W(TAG_W)) u_eq_c0 (.a(tag_q[0][of_head.data[5 +: IDX_W]]), .b(of_head.data[31 -: TAG_W]), .eq(c_eq0));
  tag_equal #(.W(TAG_W)) u_eq_c1 (.a(tag_q[1][of_head.data[5 +: IDX_W]]), .b(of_head.data[31 -: TAG_W]), .eq(c_eq1));
  assign c_way     = c_eq1 && (st_q[1][of_head.data[5 +: IDX_W]] != ST_I);
  assign c_present = (c_eq0 && (st_q[0][of_head.data[5 +: IDX_W]] != ST_I)) || c_way;

  logic head_is_req, head_is_wb, head_is_inv, need_cmp, discard;
  assign head_is_req = !of_empty && of_head.kind == K_REQ;
  assign head_is_wb  = !of_empty && (of_head.kind == K_WBADDR || of_head.kind == K_WBDATA);
  assign head_is_inv = head_is_req && of_head.cmd == CMD_INV;
  assign need_cmp    = snp_inv_q && head_is_inv;
  assign discard     = wb_cancel_r && head_is_wb &&
                       (bus_st == BUS_IDLE || bus_st == BUS_SEND_WB_ADDR || bus_st == BUS_SEND_WB_DATA);

  logic upgrade_we;
  assign upgrade_we = (bus_st == BUS_SEND_CMD) && bi.gnt && head_is_inv && !conv_rdx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_st <= BUS_IDLE; conv_rdx <= 1'b0; sent_cmd <= CMD_NONE;
      wb_sent_cnt <= '0;
    end else begin
      case (bus_st)
        BUS_IDLE: if (head_is_req) bus_st <= need_cmp ? BUS_CHECK_CMD : BUS_SEND_CMD;
        BUS_CHECK_CMD: begin
          if (head_is_inv && !c_present) conv_rdx <= 1'b1;
          bus_st <= BUS_SEND_CMD;
        end
        BUS_SEND_CMD: begin
          if (need_cmp) bus_st <= BUS_CHECK_CMD;
          else if (bi.gnt) begin
            sent_cmd <= bo.cmd;
            conv_rdx <= 1'b0;
            bus_st   <= (of_head.cmd == CMD_NC_WR || of_head.wbf) ? BUS_SEND_WB_ADDR : BUS_IDLE;
          end
        end
        BUS_SEND_WB_ADDR: begin
          if (sent_cmd == CMD_NC_WR) begin
            if (!of_empty && of_head.kind == K_NCDATA) bus_st <= BUS_IDLE;
          end else if (wb_cancel_r) begin
            bus_st <= BUS_IDLE;
          end else if (!of_empty && of_head.kind == K_WBADDR) begin
            bus_st      <= BUS_SEND_WB_DATA;
            wb_sent_cnt <= '0;
          end
        end
        BUS_SEND_WB_DATA: begin
          if (wb_cancel_r) bus_st <= BUS_IDLE;
          else if (!of_empty && of_head.kind == K_WBDATA) begin
            wb_sent_cnt <= wb_sent_cnt + 1'b1;
            if (wb_sent_cnt == 4'd7) bus_st <= BUS_IDLE;
          end
        end
        default: bus_st <= BUS_IDLE;
      endcase
    end
  end

  always_comb begin
    of_pop = discard;
    nc_sent = 1'b0;
    bo = C2B_IDLE;
    bo.req  = (bus_st == BUS_SEND_CMD) && !need_cmp && head_is_req;
    bo.cmd  = (conv_rdx && head_is_inv) ? CMD_BUSRDX : of_head.cmd;
    bo.addr = of_head.data;
    bo.wbf  = of_head.wbf;
    if (bus_st == BUS_SEND_CMD && bi.gnt && !need_cmp) of_pop = 1'b1;
    if (bus_st == BUS_SEND_WB_ADDR && !of_empty) begin
      if (sent_cmd == CMD_NC_WR && of_head.kind == K_NCDATA) begin
        of_pop = 1'b1; nc_sent = 1'b1;
        bo.dout_valid = 1'b1; bo.dout = of_head.data; bo.dout_be = of_head.be;
      end else if (sent_cmd != CMD_NC_WR && wb_cancel_r) begin
        bo.wb_cancel = 1'b1;
      end else if (sent_cmd != CMD_NC_WR && of_head.kind == K_WBADDR) begin
        of_pop = 1'b1;
        bo.wb_start = 1'b1; bo.dout = of_head.data;
      end
    end
    if (bus_st == BUS_SEND_WB_DATA) begin
      if (wb_cancel_r) bo.wb_cancel = 1'b1;
      else if (!of_empty && of_head.kind == K_WBDATA) begin
        of_pop = 1'b1; bo.dout_valid = 1'b1; bo.dout = of_head.data;
      end
    end
    // snoop replies and response data
    if (rin_st == BUS_CHECK_EQ && snoop_is_rd) begin
      bo.snoop_hit  = b_hit;
      bo.snoop_miss = !b_hit;
    end
    if (rsp_vld_q) begin
      bo.dout_valid = 1'b1;
      bo.dout       = rb_rdata[s_way];
    end
  end

  // request completion seen by part A
  assign req_done = upgrade_we ||
                    (rin_st == FETCH && f_for_coh && bi.din_valid && !bi.din_head && r_cnt == 4'd7);

  // write-back pending / cancel. wbf_out: a request announcing a write-back
  // is queued or being sent; wb_in_q: write-back entries still queued. The
  // cancel flag stays set until both are gone, so that the interconnect sees
  // wb_cancel in place of wb_start and no stale entry is ever sent.
  logic       wbf_out;
  logic [3:0] wb_in_q;
  logic       push_wb, pop_wb;
  assign push_wb = of_push && (of_din.kind == K_WBADDR || of_din.kind == K_WBDATA);
  assign pop_wb  = of_pop && head_is_wb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_pending  <= 1'b0;
      wb_cancel_r <= 1'b0;
      wbf_out     <= 1'b0;
      wb_in_q     <= '0;
    end else begin
      wb_in_q <= wb_in_q + 4'(push_wb) - 4'(pop_wb);
      if (of_push && of_din.kind == K_REQ && of_din.wbf) wbf_out <= 1'b1;
      if (bus_st == BUS_SEND_WB_ADDR && (bo.wb_start || bo.wb_cancel)) wbf_out <= 1'b0;
      if (wb_start_now) wb_pending <= 1'b1;
      if (bus_st == BUS_SEND_WB_ADDR && bo.wb_start) wb_pending <= 1'b0;
      if (wb_victim_hit) begin
        wb_cancel_r <= 1'b1;
        wb_pending  <= 1'b0;
      end else if (wb_cancel_r && wb_st == WB_IDLE && !wbf_out && wb_in_q == 4'd0 &&
                   bus_st != BUS_SEND_WB_DATA) begin
        wb_cancel_r <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- tag write ports
  // FSM_REQ_IN writes (refill head, snoop hit); part A retries on these
  assign snoop_tag_we = (rin_st == BUS_CHECK_EQ) && b_hit && (snoop_is_rd || snoop_kills);
  logic  rin_tag_we; idx_t rin_tag_idx; logic rin_tag_way; tag_t rin_tag_tag;
  mesi_e rin_tag_st; logic rin_tag_dirty; logic rin_lru_we;
  always_comb begin
    rin_tag_we = 1'b0; rin_tag_idx = s_idx; rin_tag_way = b_hway; rin_tag_tag = s_tag;
    rin_tag_st = ST_I; rin_tag_dirty = 1'b0; rin_lru_we = 1'b0;
    if (rin_st == BUS_RD_TAGS && !bi.snoop_valid && bi.din_valid && bi.din_head && !bi.din_nc) begin
      rin_tag_we    = 1'b1;                     // refill head: the new line takes the victim way
      rin_tag_idx   = mi_addr[5 +: IDX_W];
      rin_tag_way   = mi_way;
      rin_tag_tag   = bi.din_data[31 -: TAG_W];
      rin_tag_st    = mi_merge ? ST_M : (bi.din_shared ? ST_S : ST_E);
      rin_tag_dirty = mi_merge;
      rin_lru_we    = 1'b1;
    end else if (snoop_tag_we) begin
      rin_tag_we = 1'b1;
      case (s_cmd)
        CMD_BUSRD:  begin rin_tag_st = ST_S;  rin_tag_dirty = dirty_q[b_hway][s_idx]; end
        CMD_UPDATE: begin rin_tag_st = b_hst; rin_tag_dirty = 1'b0; end
        default:    begin rin_tag_st = ST_I;  rin_tag_dirty = 1'b0; end
      endcase
    end
  end

  // the Invalidate upgrade never coincides with an FSM_REQ_IN write: it is
  // granted while the interconnect is arbitrating, when no snoop or refill
  // reaches this cache
  always_comb begin
    b_tag_we = rin_tag_we; b_tag_idx = rin_tag_idx; b_tag_way = rin_tag_way; b_tag_tag = rin_tag_tag;
    b_tag_st = rin_tag_st; b_tag_dirty = rin_tag_dirty; b_lru_we = rin_lru_we;
    if (upgrade_we) begin
      b_tag_we    = 1'b1;                       // Invalidate granted: exclusive now
      b_tag_idx   = of_head.data[5 +: IDX_W];
      b_tag_way   = c_way;
      b_tag_tag   = of_head.data[31 -: TAG_W];
      b_tag_st    = ST_E;
      b_tag_dirty = dirty_q[c_way][of_head.data[5 +: IDX_W]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        lru_q[s] <= 1'b0;
        for (int w = 0; w < 2; w++) begin
          tag_q[w][s]   <= '0;
          st_q[w][s]    <= ST_I;
          dirty_q[w][s] <= 1'b0;
        end
      end
    end else begin
      if (a_tag_we) begin
        st_q[a_way_sel][a_idx]    <= ST_M;
        dirty_q[a_way_sel][a_idx] <= 1'b1;
      end
      if (a_lru_we) lru_q[a_idx] <= a_way_sel;
      if (b_tag_we) begin
        tag_q[b_tag_way][b_tag_idx]   <= b_tag_tag;
        st_q[b_tag_way][b_tag_idx]    <= b_tag_st;
        dirty_q[b_tag_way][b_tag_idx] <= b_tag_dirty;
      end
      if (b_lru_we) lru_q[b_tag_idx] <= b_tag_way;
    end
  end

  a_ack_needs_cmd: assert property (@(posedge clk) disable iff (!rst_n) cache_ack |-> (read_cmd || write_cmd))
    else $error("coherent_cache: acknowledge without an access");
  a_no_queue_overflow: assert property (@(posedge clk) disable iff (!rst_n) of_push |-> (!of_full && 32'(of_count) < OUT_FIFO_DEPTH))
    else $error("coherent_cache: outgoing queue overflow");
  a_refill_not_in_check: assert property (@(posedge clk) disable iff (!rst_n)
      b_lru_we |-> cpu_st != CHECK_EQUALITY)
    else $error("coherent_cache: refill while the processor side compares tags");
  a_upgrade_alone: assert property (@(posedge clk) disable iff (!rst_n) upgrade_we |-> !rin_tag_we)
    else $error("coherent_cache: Invalidate upgrade collides with a snoop or refill");
  a_upgrade_present: assert property (@(posedge clk) disable iff (!rst_n) upgrade_we |-> c_present)
    else $error("coherent_cache: Invalidate granted for a line no longer held");
  a_refill_matches: assert property (@(posedge clk) disable iff (!rst_n)
      (rin_st == BUS_RD_TAGS && bi.din_valid && bi.din_head && !bi.din_nc) |-> bi.din_data[31:5] == mi_addr[31:5])
    else $error("coherent_cache: refill for line %h, requested %h", bi.din_data, {mi_addr, 2'b00});
endmodule
