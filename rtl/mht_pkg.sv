// mht_pkg: sizes, record types and small helper functions shared by the
// Multi Hash Table stream aggregation design.
//
// The default sizes are the main configuration: N = 8 tuples per cycle, m = 3
// address mappings, B = 32 banks, 32K hash table entries (1K per bank), a
// 10-stage waterfall cache with 8 entries per stage, 3-byte keys and 1-byte
// values, and DRAM flushes of 64 values. Everything else here (flit layout,
// ring message layout, queue depths, the hash function) is this design's own
// choice and is documented next to each item.
package mht_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N       = 8;    // tuples per cycle
  localparam int unsigned LOG_N   = $clog2(N);
  localparam int unsigned M       = 3;    // address mappings
  localparam int unsigned BB      = 5;    // b: bank-select bits per mapping
  localparam int unsigned B       = 1 << BB;        // banks
  localparam int unsigned A_W     = M * BB;         // a: hash address bits (r = 0)
  localparam int unsigned IDX_W   = A_W - BB;       // s: index bits inside a bank
  localparam int unsigned S       = 1 << IDX_W;     // entries per bank
  localparam int unsigned MAP_W   = 2;              // mapping id width
  localparam int unsigned P       = 10;   // waterfall cache stages
  localparam int unsigned KEY_W   = 24;   // 3-byte keys
  localparam int unsigned VAL_W   = 8;    // 1-byte values
  localparam int unsigned CNT_W   = LOG_N + 1;      // 0..N values per tuple
  localparam int unsigned LVL_W   = 2;    // three bank priority levels 0..2
  localparam int unsigned AGE_W   = 4;    // cache entry age counter
  localparam int unsigned FLUSH_V = 64;   // values per DRAM flush (DRAM granularity)
  localparam int unsigned WS_MAX  = 1024; // largest window, DRAM region size in values
  localparam int unsigned OFF_W   = $clog2(WS_MAX);
  localparam int unsigned WS_W    = OFF_W + 1;
  localparam int unsigned NCOMP   = N / 2; // parallel compute modules
  localparam int unsigned TAG_W   = 8;    // key tag kept by the lookup filter

  typedef logic [KEY_W-1:0] key_t;
  typedef logic [VAL_W-1:0] val_t;
  typedef logic [A_W-1:0]   addr_t;
  typedef logic [MAP_W-1:0] map_t;
  typedef logic [BB-1:0]    bank_t;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [LVL_W-1:0] lvl_t;

  // A multi-value tuple <k, v1, v2, ...>: up to N values, oldest in vals[0].
  typedef struct packed {
    logic                 valid;
    key_t                 key;
    addr_t                addr;   // hashed key
    logic [CNT_W-1:0]     cnt;    // number of values, 1..N when valid
    logic [N-1:0][VAL_W-1:0] vals;
  } mtuple_t;

  // One flit on the link to the banks. A packet is either a single head flit
  // carrying the key and its only value, or a head flit carrying the key and
  // the value count followed by body flits packing four values each.
  typedef struct packed {
    logic       valid;
    logic       head;
    logic       last;
    bank_t      bank;    // destination bank
    map_t       map;     // mapping used to pick the bank
    logic [31:0] data;   // head: {key, count or value}; body: 4 values, oldest in [7:0]
  } flit_t;

  // Message on the inter-bank ring.
  typedef enum logic [1:0] {MSG_LOOKUP = 2'd0, MSG_NEG = 2'd1, MSG_POS = 2'd2} msg_e;

  typedef struct packed {
    logic       valid;
    msg_e       kind;
    bank_t      dst;       // bank the message travels to
    idx_t       dst_idx;   // entry there
    bank_t      src;       // bank that sent it (reply address)
    idx_t       src_idx;
    map_t       map;       // lookup: mapping checked; reply: mapping that was checked
    key_t       key;
    logic [OFF_W-1:0] tail;  // POS reply: DRAM tail offset
    logic [WS_W-1:0]  fill;  // POS reply: values in the window
    logic [WS_W-1:0]  since; // POS reply: values since last aggregation
  } ring_msg_t;

  // DRAM write (flush) request: up to FLUSH_V values into the circular
  // window region of hash address `region`, starting at offset `off`.
  typedef struct packed {
    addr_t                        region;
    logic [OFF_W-1:0]             off;
    logic [$clog2(FLUSH_V):0]     len;
    logic [FLUSH_V-1:0][VAL_W-1:0] data;
  } dram_wr_t;

  // Aggregation request: the window of `ws` values ending before `tail`.
  typedef struct packed {
    key_t             key;
    addr_t            region;
    logic [OFF_W-1:0] tail;
    logic [WS_W-1:0]  ws;
  } agg_req_t;

  // ----------------------------------------------------------- functions
  // Hash: the low 15 key bits are multiplied by an odd constant (a bijection
  // modulo 2^15) and XORed with a fold of the upper key bits. Keys below 2^15
  // therefore never collide.
  localparam logic [A_W-1:0] HASH_MUL = 15'h2A5B;
  function automatic addr_t hash_key(key_t k);
    logic [2*A_W-1:0] p;
    logic [A_W-1:0]   hi;
    p  = A_W'(k) * HASH_MUL;
    hi = A_W'(k >> A_W) * 15'h1F31;
    return p[A_W-1:0] ^ hi;
  endfunction

  // Bank selected by mapping mp: b address bits [BB*mp +: BB] (Fig. 3 layout).
  function automatic bank_t map_bank(addr_t a, map_t mp);
    return bank_t'(a >> (BB * mp));
  endfunction

  // Index inside the bank: the address bits left over by mapping mp, in order.
  function automatic idx_t map_idx(addr_t a, map_t mp);
    idx_t r;
    int   j;
    r = '0;
    j = 0;
    for (int i = 0; i < A_W; i++) begin
      if (i / BB != int'(mp)) begin
        r[j] = a[i];
        j++;
      end
    end
    return r;
  endfunction

  // Inverse of map_idx plus bank: rebuild the hash address.
  function automatic addr_t unmap(bank_t bk, idx_t ix, map_t mp);
    addr_t r;
    int    j;
    r = '0;
    j = 0;
    for (int i = 0; i < A_W; i++) begin
      if (i / BB == int'(mp)) r[i] = bk[i % BB];
      else begin
        r[i] = ix[j];
        j++;
      end
    end
    return r;
  endfunction

endpackage
