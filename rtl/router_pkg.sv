// router_pkg: types and constants shared by the layer-3 router.
//
// The router moves a Packet Header Vector (PHV) from kernel to kernel while the
// packet body waits in the on-chip packet server. The PHV holds the Ethernet and
// IPv4 headers as they sit on the wire (34 bytes, big-endian, first byte in the
// most significant bits) plus the metadata the stages add: ingress port, length,
// packet-server slot, next hop, egress port and a drop flag.
//
// Header layouts follow the Ethernet II and IPv4 standards. Widths that the
// design chooses itself (256-bit stream words, 16 buffer slots, 8-bit ports,
// 48-bit action data) are collected here.
package router_pkg;

  // Packet stream and packet server geometry.
  localparam int unsigned WORD_W      = 256;             // bits per stream word
  localparam int unsigned WORD_BYTES  = WORD_W / 8;      // 32 bytes
  localparam int unsigned EMPTY_W     = $clog2(WORD_BYTES);
  localparam int unsigned SLOTS       = 16;              // packets held in flight
  localparam int unsigned SLOT_W      = $clog2(SLOTS);
  localparam int unsigned SLOT_WORDS  = 48;              // 1536 bytes per slot
  localparam int unsigned WIDX_W      = $clog2(SLOT_WORDS);
  localparam int unsigned PS_DEPTH    = SLOTS * SLOT_WORDS;
  localparam int unsigned PS_ADDR_W   = $clog2(PS_DEPTH);
  localparam int unsigned PORT_W      = 8;
  localparam int unsigned LEN_W       = 16;

  // Lookup engines: 40-bit keys, 48-bit action data.
  localparam int unsigned KEY_W       = 40;
  localparam int unsigned ACT_W       = 48;
  localparam int unsigned TAG_W       = 2;

  localparam logic [15:0] ETYPE_IPV4  = 16'h0800;

  typedef struct packed {
    logic [47:0] dst;
    logic [47:0] src;
    logic [15:0] etype;
  } eth_h_t;                                             // 112 bits

  typedef struct packed {
    logic [3:0]  version;
    logic [3:0]  ihl;
    logic [7:0]  tos;
    logic [15:0] total_len;
    logic [15:0] id;
    logic [2:0]  flags;
    logic [12:0] frag_off;
    logic [7:0]  ttl;
    logic [7:0]  proto;
    logic [15:0] csum;
    logic [31:0] src;
    logic [31:0] dst;
  } ipv4_h_t;                                            // 160 bits

  localparam int unsigned HDR_BYTES = 34;
  localparam int unsigned HDR_W     = HDR_BYTES * 8;     // 272 bits

  typedef struct packed {
    eth_h_t  eth;
    ipv4_h_t ipv4;
  } hdr_t;

  typedef struct packed {
    logic [PORT_W-1:0] in_port;
    logic [LEN_W-1:0]  pkt_len;      // bytes
    logic [SLOT_W-1:0] slot;         // packet-server slot of the packet body
    logic              eth_valid;    // set by the parser
    logic              ipv4_valid;   // set by the parser
    logic              csum_ok;      // set by the parser
    logic              drop;         // packet is discarded at the deparser
    logic [31:0]       nhop;         // next-hop IPv4 address (LPM action)
    logic [PORT_W-1:0] egress_port;  // egress port (LPM action)
  } meta_t;

  typedef struct packed {
    meta_t meta;
    hdr_t  hdr;
  } phv_t;

  // A PHV waiting in a match+action stage for its lookup result.
  typedef struct packed {
    logic lookup;                   // a query was issued for this PHV
    phv_t phv;
  } pend_t;

  // Match+action stages of the router, in pipeline order.
  typedef enum logic [1:0] {
    ST_IPV4_LPM   = 2'd0,
    ST_FORWARD    = 2'd1,
    ST_SEND_FRAME = 2'd2
  } stage_e;

  // Host control-plane command: write one table entry.
  typedef struct packed {
    stage_e           table_id;
    logic [15:0]      index;
    logic             valid;        // entry valid (0 deletes it)
    logic [KEY_W-1:0] key;
    logic [5:0]       prefix_len;   // ternary tables: number of leading key bits that must match
    logic [ACT_W-1:0] action;
  } ctl_cmd_t;

  // Lookup query, result and table entry write of a lookup engine.
  typedef struct packed {
    logic [KEY_W-1:0] key;
    logic [TAG_W-1:0] tag;
  } query_t;

  typedef struct packed {
    logic             hit;
    logic [15:0]      index;
    logic [ACT_W-1:0] action;
    logic [TAG_W-1:0] tag;
  } result_t;

  typedef struct packed {
    logic [15:0]      index;
    logic             valid;
    logic [KEY_W-1:0] key;
    logic [KEY_W-1:0] mask;         // 1 = bit must match (ignored by exact tables)
    logic [ACT_W-1:0] action;
  } entry_wr_t;

endpackage
