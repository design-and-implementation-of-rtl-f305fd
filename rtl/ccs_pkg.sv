// ccs_pkg: types and constants shared by the coherent memory sub-system.
//
// The sub-system joins two processors' data sides to a shared external DDR
// memory through private MESI caches and a bus-like interconnect. This package
// holds what the blocks agree on: the bus message opcodes, the MESI states,
// the cache-line geometry (8 words of 32 bits, fixed as in the design this
// follows), and the packed bundles that carry a cache port of the
// interconnect and an IPIF master/slave port of the DDR path.
//
// The opcode encodings, the bundle layouts and the byte-lane order of the
// 64-bit IPIF data bus are this implementation's choices.
package ccs_pkg;

  localparam int WORDS_PER_LINE = 8;   // 8 words of 32 bits per cache line
  localparam int LINE_BYTES     = 32;
  localparam int OFF_W          = 3;   // word offset inside a line

  // Bus message opcodes. BusRd/BusRdX/Invalidate/Update are broadcast to the
  // other participants; NcRd/NcWr go only to memory; Wb appears only in the
  // interconnect's command queue toward the DDR controller.
  typedef enum logic [2:0] {
    CMD_NONE   = 3'd0,
    CMD_BUSRD  = 3'd1,
    CMD_BUSRDX = 3'd2,
    CMD_INV    = 3'd3,
    CMD_UPDATE = 3'd4,
    CMD_NC_RD  = 3'd5,
    CMD_NC_WR  = 3'd6,
    CMD_WB     = 3'd7
  } bus_cmd_e;

  typedef enum logic [1:0] {
    ST_I = 2'd0,
    ST_S = 2'd1,
    ST_E = 2'd2,
    ST_M = 2'd3
  } mesi_e;

  // Participant -> interconnect.
  typedef struct packed {
    logic        req;         // wants the bus; held until gnt
    bus_cmd_e    cmd;         // message type, valid with req
    logic [31:0] addr;        // byte address of the message, valid with req
    logic        wbf;         // with req: a write-back of the victim block follows
    logic        dout_valid;  // a word on dout (nc-write data, write-back or response data)
    logic [31:0] dout;
    logic [3:0]  dout_be;     // byte enables of a non-cacheable write word
    logic        wb_start;    // dout carries the address of an evicted block
    logic        wb_cancel;   // abandon the write-back in progress
    logic        snoop_hit;   // positive reply to a broadcast BusRd/BusRdX (B_CoherenceData)
    logic        snoop_miss;  // negative reply to a broadcast BusRd/BusRdX (B_Request_miss)
  } c2b_t;

  // Interconnect -> participant.
  typedef struct packed {
    logic        gnt;         // request accepted and broadcast this cycle
    logic        snoop_valid; // another participant's message is broadcast
    bus_cmd_e    snoop_cmd;
    logic [31:0] snoop_addr;
    logic        din_valid;   // a word of an incoming message
    logic        din_head;    // the word is the head (address) of a response
    logic        din_nc;      // the response carries non-cacheable read data
    logic        din_shared;  // with a block head: load the block Shared (B_SharedState)
    logic [31:0] din_data;
    logic        wb_ack;      // the write-back can no longer be cancelled
  } b2c_t;

  // IPIF master -> slave (Bus2IP_*). Byte lane k of data is be[k];
  // lane 7 (bits 63:56) holds the lowest address (big-endian).
  typedef struct packed {
    logic        cs;
    logic        rdreq;
    logic        wrreq;
    logic        burst;
    logic [31:0] addr;
    logic [7:0]  be;
    logic [63:0] data;
  } ipif_m2s_t;

  // IPIF slave -> master (IP2Bus_*).
  typedef struct packed {
    logic        rdack;
    logic        wrack;
    logic [63:0] data;
  } ipif_s2m_t;

  // Processor data-side (DCU) PLB master -> slave: C405PLBDCU* signals.
  // Shared accesses are single-word transfers; be[7] is the lowest byte.
  typedef struct packed {
    logic        request;
    logic        rnw;
    logic [31:0] abus;
    logic [7:0]  be;
    logic [63:0] wrdbus;
  } dcu_m2s_t;

  // PLB slave -> processor DCU: PLBC405DCU* signals.
  typedef struct packed {
    logic        addrack;
    logic        wrdack;
    logic        rddack;
    logic [63:0] rddbus;
    logic        busy;
  } dcu_s2m_t;

  localparam c2b_t      C2B_IDLE  = '0;
  localparam b2c_t      B2C_IDLE  = '0;
  localparam ipif_m2s_t IPIF_M_IDLE = '0;
  localparam ipif_s2m_t IPIF_S_IDLE = '0;

  // Merge a 32-bit word with new bytes under byte enables (be[3] = bits 31:24).
  function automatic logic [31:0] merge_be(input logic [31:0] old_w,
                                           input logic [31:0] new_w,
                                           input logic [3:0]  be);
    logic [31:0] r;
    for (int i = 0; i < 4; i++)
      r[i*8 +: 8] = be[i] ? new_w[i*8 +: 8] : old_w[i*8 +: 8];
    return r;
  endfunction

endpackage
