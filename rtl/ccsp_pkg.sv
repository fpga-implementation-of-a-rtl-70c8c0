// ccsp_pkg: types and constants shared by the configurable cache/scratchpad
// tile, its integrated network interface (NI) and the crossbar.
//
// Sizes follow the prototype: 4 tiles, 64 KB 4-way L2 with 32-byte lines and
// 64-bit data banks, 4 KB direct-mapped L1, 256-byte maximum packet payload,
// 5-port 32-bit crossbar. The address map, the tag word layout, the packet
// format and the NI command descriptor layout are this design's own choices;
// they are documented next to each definition below.
package ccsp_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NODES      = 4;    // tiles
  localparam int unsigned NODE_W     = 2;
  localparam int unsigned PORT_W     = 3;    // crossbar port number
  localparam int unsigned DDR_PORT   = 4;    // crossbar port of the DRAM controller
  localparam int unsigned L2_WAYS    = 4;
  localparam int unsigned L2_SETS    = 512;  // 64 KB / 4 ways / 32 B
  localparam int unsigned SET_W      = 9;
  localparam int unsigned L2_TAG_W   = 14;   // DRAM is 256 MB: addr[27:14]
  localparam int unsigned DADDR_W    = 13;   // 64-bit words in the L2: {way,set,dword}
  localparam int unsigned TADDR_W    = 11;   // tag entries: {way,set}
  localparam int unsigned LINE_WORDS = 8;    // 32-bit words in a 32-byte line
  localparam int unsigned MAX_PKT_WORDS = 64; // 256-byte maximum payload

  // ---------------------------------------------------------- address map
  // addr[31:28] region:
  //   0x0 : DRAM, 256 MB, cacheable
  //   0x8 : L2 data arrays (scratchpad view): node in [25:24], way in [15:14],
  //         set in [13:5], byte in line [4:0]
  //   0x9 : L2 tag arrays, same node/way/set fields, one 32-bit word per line
  localparam logic [3:0] RGN_DRAM = 4'h0;
  localparam logic [3:0] RGN_DATA = 4'h8;
  localparam logic [3:0] RGN_TAG  = 4'h9;

  typedef enum logic [2:0] {
    AC_CACHEABLE = 3'd0,
    AC_SCRATCH   = 3'd1,
    AC_REMOTE    = 3'd2,
    AC_TAG       = 3'd3,
    AC_FAULT     = 3'd4
  } acc_class_e;

  function automatic logic [NODE_W-1:0] addr_node(input logic [31:0] a);
    return a[25:24];
  endfunction

  // 64-bit word address inside the local L2 arrays of a scratchpad address
  function automatic logic [DADDR_W-1:0] sp_daddr(input logic [31:0] a);
    return a[15:3];
  endfunction

  function automatic logic [TADDR_W-1:0] sp_taddr(input logic [31:0] a);
    return {a[15:14], a[13:5]};
  endfunction

  // scratchpad address of a line of a given node, way and set
  function automatic logic [31:0] line_addr(input logic [NODE_W-1:0] n,
                                            input logic [1:0] w,
                                            input logic [SET_W-1:0] s);
    return {RGN_DATA, 2'b00, n, 8'h00, w, s, 5'b0};
  endfunction

  // ------------------------------------------------------------- L2 tags
  // Line state used by the NI for locked (scratchpad) lines.
  typedef enum logic [1:0] {
    LS_PLAIN   = 2'd0,
    LS_CMD     = 2'd1,   // NI command buffer (DMA / message descriptor)
    LS_COUNTER = 2'd2,   // w0 counter, w1 notification address, w2 notification value
    LS_QUEUE   = 2'd3    // w0 base address, w1 slots, w2 head, w3 tail
  } line_state_e;

  typedef struct packed {
    logic                valid;
    logic                dirty;
    logic                lock;     // pinned: scratchpad, ignored by tag compare
    logic                pending;  // waiting for a fill from memory
    line_state_e         state;
    logic [L2_TAG_W-1:0] tag;
  } l2_tag_t;                       // 20 bits, read/written as addr region 0x9

  // -------------------------------------------------------------- packets
  // Flit stream: 32-bit words with a last marker. A packet is
  //   header, destination address, acknowledgement address, payload..., CRC
  // header = {type[31:30], dst port[29:27], src port[26:24], payload words[23:16], 16'h0}
  // WRITE payload: the data words. READ payload: {return address, size in bytes}.
  typedef enum logic [1:0] {
    PT_WRITE = 2'b01,
    PT_READ  = 2'b10
  } pkt_type_e;

  typedef struct packed {
    logic [31:0] data;
    logic        last;
  } flit_t;

  function automatic logic [31:0] mk_header(input pkt_type_e t, input logic [PORT_W-1:0] dst,
                                            input logic [PORT_W-1:0] src, input logic [7:0] nw);
    return {t, dst, src, nw, 16'h0};
  endfunction

  // crossbar port an address belongs to
  function automatic logic [PORT_W-1:0] addr_port(input logic [31:0] a);
    return (a[31:28] == RGN_DRAM) ? PORT_W'(DDR_PORT) : PORT_W'(addr_node(a));
  endfunction

  // ---------------------------------------------------- NI command buffers
  // Descriptor in a command line: w0 = {opcode[31:28], 12'h0, size in bytes[15:0]},
  // w1 = destination address, w2 = acknowledgement address (0 = none),
  // w3 = source address (copy) or w3..w7 = message data.
  typedef enum logic [3:0] {
    OP_NONE = 4'h0,
    OP_COPY = 4'h1,
    OP_MSG  = 4'h2
  } ni_op_e;

  typedef struct packed {
    ni_op_e      op;
    logic [15:0] size;     // bytes
    logic [31:0] dst;
    logic [31:0] ack;
    logic [31:0] src;
    logic [4:0][31:0] msg; // message words
    logic [31:0] desc;     // address of the descriptor line (0: none to update)
  } ni_cmd_t;

  // Cache transfer registers offered to the L2 controller.
  typedef enum logic [1:0] {
    CC_FILL    = 2'd1,
    CC_WB      = 2'd2,
    CC_WB_FILL = 2'd3
  } cc_op_e;

  typedef struct packed {
    cc_op_e      op;
    logic [31:0] line;     // local scratchpad-view address of the L2 line
    logic [31:0] wb_addr;  // DRAM address the evicted line is written to
    logic [31:0] fill_addr;// DRAM address requested by the miss
  } cc_req_t;

  // Requests from the L1 / tile front end to the L2 controller.
  typedef enum logic [2:0] {
    L2_RDLINE = 3'd0,   // cacheable read miss in L1: 4 beats of 64 bits
    L2_WR     = 3'd1,   // cacheable write (L1 is write-through)
    L2_SPRD   = 3'd2,   // local scratchpad read
    L2_SPWR   = 3'd3,   // local scratchpad write
    L2_TAGRD  = 3'd4,   // tag array read
    L2_TAGWR  = 3'd5    // tag array write (lock bits, line state)
  } l2_op_e;

  // Acknowledgement / notification write of one word.
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] value;
  } ack_req_t;

  // Remote-store buffer contents.
  typedef struct packed {
    logic [31:0]                 addr;
    logic [3:0]                  nwords;
    logic [LINE_WORDS-1:0][31:0] data;
  } rstore_t;

  // Strobes of the mechanisms of a tile, one cycle each, for event counting.
  typedef struct packed {
    logic l1_hit, l1_miss;
    logic l2_hit, l2_miss, l2_hit_under_miss, l2_bypass;
    logic fill, sp_write, counter, notify, enqueue, queue_full, read_req;
    logic pkt_out, segment, crc_drop, rs_coalesce;
    logic src_cache, src_ack, src_rstore, src_cwb, src_pcq;
  } tile_ev_t;

endpackage
