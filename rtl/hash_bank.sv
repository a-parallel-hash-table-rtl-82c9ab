// hash_bank: one bank of the Multi Hash Table: an SRAM of S entries and the
// controller that applies requests to it by read-modify-write.
//
// An entry holds one key with its sliding-window metadata: valid bit, key,
// the mapping that placed it, a pending flag with one bit per mapping whose
// lookup has been answered, the DRAM tail offset of the key's window, the
// number of values in the window (fill) and since the last aggregation,
// whether the window has been aggregated yet, and a local buffer of the
// FLUSH_V most recent values with its count. Each key's window lives in DRAM
// in a fixed circular region of WS_MAX values indexed by the key's hash
// address, the same whatever mapping placed the entry in this bank, so a
// key moves between banks by handing over pointers only.
//
// Requests, taken in queue order (replies bypass the queue):
//   packet (head flit + values): read the entry at the index given by the
//     packet's mapping. Hit: append the values. Miss: a valid entry with
//     another key is evicted (its buffered values flushed, a collision
//     reported), the key is inserted with fresh metadata and one lookup per
//     other mapping goes out on the ring, to the bank and index where that
//     mapping would have put the key. The entry stays pending until every
//     lookup is answered.
//   values: one per cycle into the local buffer. A full buffer is flushed
//     to DRAM in one FLUSH_V-value write. When the window holds ws values
//     for the first time, and then every wa values, the buffered values are
//     flushed and an aggregation request (window end and size) is sent to
//     the compute stage.
//   lookup from another bank: if the entry holds the key it is invalidated,
//     its values are flushed and a POS reply carries tail, fill and count
//     back; otherwise a NEG reply is sent.
//   POS reply for a pending entry: the entry adopts the old tail and adds
//     the old counts to its own.
// While an entry is pending it neither flushes nor aggregates: values
// collect in the local buffer, and if the buffer fills the bank stalls until
// the replies arrive (POS replies are accepted during the stall).
//
// Timing: SRAM read latency 1. A request takes one cycle to read the entry,
// one to decide, one per value and one to write back; flushes and requests
// wait for their ready signals.
// Following the document: entry contents, hit/miss handling, lookups to the
// m-1 alternative locations, flush to DRAM at its access granularity,
// invalidation and pointer hand-over, collision report. This design's own:
// the sequential controller (the document pipelines the read-modify-write
// over both SRAM ports), the stall in place of the temporary DRAM buffer,
// no victim cache, no entry expiry by timestamp, flushing the partial buffer
// before each aggregation.
module hash_bank
  import mht_pkg::*;
#(
  parameter int unsigned ID = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WS_W-1:0]    cfg_ws,
  input  logic [WS_W-1:0]    cfg_wa,
  // bank queue
  input  logic               q_valid,
  input  logic               q_is_lk,
  input  flit_t              q_flit,
  input  ring_msg_t          q_msg,
  output logic               q_pop,
  // ring node
  output logic               ctl_push,
  output ring_msg_t          ctl_msg,
  input  logic               ctl_ready,
  input  logic               rsp_valid,
  input  ring_msg_t          rsp_msg,
  output logic               rsp_pop,
  output logic               filt_we,
  output idx_t               filt_idx,
  output logic               filt_valid,
  output logic [TAG_W-1:0]   filt_tag,
  output logic               mb_clr,
  output idx_t               mb_idx,
  input  logic [M-1:0]       mb_bits,
  // DRAM writes
  output logic               wr_valid,
  output dram_wr_t           wr_req,
  input  logic               wr_ready,
  // aggregation requests
  output logic               agg_valid,
  output agg_req_t           agg_req,
  input  logic               agg_ready,
  // hash collision report
  output logic               coll_valid,
  output key_t               coll_key,
  // events
  output logic               ev_hit,
  output logic               ev_insert,
  output logic               ev_lookup_pos,
  output logic               ev_stall,
  output logic               ev_flush
);
  localparam int unsigned NL_W = $clog2(FLUSH_V) + 1;

  typedef struct packed {
    logic                           valid;
    key_t                           key;
    map_t                           map;
    logic                           pend;
    logic [M-1:0]                   rbits;
    logic                           agd;
    logic [OFF_W-1:0]               tail;
    logic [WS_W-1:0]                fill;
    logic [WS_W-1:0]                since;
    logic [NL_W-1:0]                nloc;
    logic [FLUSH_V-1:0][VAL_W-1:0]  lbuf;
  } bent_t;

  typedef enum logic [3:0] {
    S_IDLE, S_HEAD, S_COLL, S_LKSEND, S_VALS, S_FLUSH, S_AGGF, S_AGGR, S_WB,
    S_LKUP, S_LKFL, S_LKRSP, S_RESP
  } st_e;

  bent_t mem [S];
  bent_t rdata;
  logic  rd_en;
  idx_t  rd_idx;
  logic  we;
  bent_t wdata;
  idx_t  e_idx, e_idx_n;

  always_ff @(posedge clk) begin
    if (rd_en) rdata <= mem[rd_idx];
    if (we) mem[e_idx] <= wdata;
  end

  st_e        st, st_n;
  bent_t      e, e_n;
  addr_t      e_addr, e_addr_n;    // hash address of the request key
  key_t       r_key, r_key_n;
  map_t       r_map, r_map_n;
  logic       single, single_n;
  val_t       sval, sval_n;
  logic [CNT_W:0] vleft, vleft_n;
  logic [1:0] qv, qv_n;            // value position in the current body flit
  logic [1:0] lkj, lkj_n;          // next mapping to look up
  ring_msg_t  lk, lk_n;            // lookup being served
  st_e        ret, ret_n;          // where to go after an aggregation

  function automatic logic agg_due(bent_t x, logic [WS_W-1:0] ws, logic [WS_W-1:0] wa);
    return !x.pend && x.fill == ws && (!x.agd || x.since >= wa);
  endfunction

  // Resolve a pending entry once every other mapping has answered.
  function automatic bent_t resolve(bent_t x, logic [M-1:0] mb);
    bent_t y;
    y = x;
    if (x.pend && ((x.rbits | mb) == {M{1'b1}})) y.pend = 1'b0;
    return y;
  endfunction

  // Merge a POS reply into a pending entry. A pending entry has written
  // nothing to DRAM: its own values are all in the local buffer and will be
  // flushed at the adopted tail, so the window becomes the reply's window
  // plus the buffered values. If a second POS arrives (the key was held in
  // two places), the later pointers replace the earlier ones, which keeps
  // the window contiguous.
  function automatic bent_t merge_pos(bent_t x, ring_msg_t m, logic [WS_W-1:0] ws);
    bent_t y;
    int unsigned f;
    y = x;
    f = int'(m.fill) + int'(x.nloc);
    y.tail  = m.tail;
    y.fill  = (f > int'(ws)) ? ws : WS_W'(f);
    y.since = m.since + WS_W'(x.nloc);
    y.agd   = (m.fill == ws);
    y.rbits[m.map] = 1'b1;
    return y;
  endfunction

  always_comb begin
    bent_t x;
    val_t  v;
    bank_t ob;
    idx_t  oi;
    key_t  k;
    addr_t a;
    x  = e;
    v  = '0;
    ob = '0;
    oi = '0;
    k  = '0;
    a  = '0;
    st_n     = st;
    e_n      = e;
    e_idx_n  = e_idx;
    e_addr_n = e_addr;
    r_key_n  = r_key;
    r_map_n  = r_map;
    single_n = single;
    sval_n   = sval;
    vleft_n  = vleft;
    qv_n     = qv;
    lkj_n    = lkj;
    lk_n     = lk;
    ret_n    = ret;
    rd_en    = 1'b0;
    rd_idx   = '0;
    we       = 1'b0;
    wdata    = e;
    q_pop    = 1'b0;
    rsp_pop  = 1'b0;
    ctl_push = 1'b0;
    ctl_msg  = '0;
    filt_we  = 1'b0;
    filt_idx = e_idx;
    filt_valid = 1'b0;
    filt_tag = '0;
    mb_clr   = 1'b0;
    mb_idx   = e_idx;
    wr_valid = 1'b0;
    wr_req   = '0;
    agg_valid = 1'b0;
    agg_req  = '0;
    coll_valid = 1'b0;
    coll_key = e.key;
    ev_hit = 1'b0;
    ev_insert = 1'b0;
    ev_lookup_pos = 1'b0;
    ev_stall = 1'b0;
    ev_flush = 1'b0;

    unique case (st)
      S_IDLE: begin
        if (rsp_valid) begin
          rsp_pop = 1'b1;
          lk_n    = rsp_msg;
          e_idx_n = rsp_msg.dst_idx;
          rd_en   = 1'b1;
          rd_idx  = rsp_msg.dst_idx;
          st_n    = S_RESP;
        end else if (q_valid && q_is_lk) begin
          q_pop   = 1'b1;
          lk_n    = q_msg;
          e_idx_n = q_msg.dst_idx;
          rd_en   = 1'b1;
          rd_idx  = q_msg.dst_idx;
          st_n    = S_LKUP;
        end else if (q_valid && q_flit.head) begin
          q_pop    = 1'b1;
          k        = q_flit.data[31:8];
          a        = hash_key(k);
          r_key_n  = k;
          r_map_n  = q_flit.map;
          e_addr_n = a;
          e_idx_n  = map_idx(a, q_flit.map);
          rd_en    = 1'b1;
          rd_idx   = e_idx_n;
          single_n = q_flit.last;
          sval_n   = q_flit.data[7:0];
          vleft_n  = q_flit.last ? (CNT_W+1)'(1) : (CNT_W+1)'(q_flit.data[7:0]);
          qv_n     = '0;
          st_n     = S_HEAD;
        end
      end

      S_HEAD: begin
        mb_idx = e_idx;
        if (rdata.valid && rdata.key == r_key) begin
          ev_hit = 1'b1;
          e_n    = resolve(rdata, mb_bits);
          st_n   = S_VALS;
        end else begin
          e_n  = rdata;
          st_n = (rdata.valid && rdata.nloc != 0) ? S_COLL : S_LKSEND;
          coll_valid = rdata.valid;
          coll_key   = rdata.key;
          if (!(rdata.valid && rdata.nloc != 0)) begin
            e_n       = '0;
            e_n.valid = 1'b1;
            e_n.key   = r_key;
            e_n.map   = r_map;
            e_n.pend  = (M > 1);
            e_n.rbits = '0;
            e_n.rbits[r_map] = 1'b1;
            ev_insert = 1'b1;
            filt_we    = 1'b1;
            filt_valid = 1'b1;
            filt_tag   = r_key[TAG_W-1:0];
            mb_clr     = 1'b1;
            lkj_n      = '0;
          end
        end
      end

      S_COLL: begin
        // Flush the evicted key's buffered values into its own region.
        wr_valid     = 1'b1;
        wr_req.region = hash_key(e.key);
        wr_req.off   = e.tail;
        wr_req.len   = e.nloc;
        wr_req.data  = e.lbuf;
        if (wr_ready) begin
          ev_flush  = 1'b1;
          e_n       = '0;
          e_n.valid = 1'b1;
          e_n.key   = r_key;
          e_n.map   = r_map;
          e_n.pend  = (M > 1);
          e_n.rbits = '0;
          e_n.rbits[r_map] = 1'b1;
          ev_insert = 1'b1;
          filt_we    = 1'b1;
          filt_valid = 1'b1;
          filt_tag   = r_key[TAG_W-1:0];
          mb_clr     = 1'b1;
          lkj_n      = '0;
          st_n       = S_LKSEND;
        end
      end

      S_LKSEND: begin
        // One lookup per cycle to where each other mapping puts the key.
        if (int'(lkj) >= M) begin
          st_n = S_VALS;
        end else if (lkj == e.map) begin
          lkj_n = lkj + 1'b1;
        end else begin
          ob = map_bank(e_addr, lkj);
          oi = map_idx(e_addr, lkj);
          if (int'(ob) == ID && oi == e_idx) begin
            e_n.rbits[lkj] = 1'b1;
            lkj_n = lkj + 1'b1;
          end else if (ctl_ready) begin
            ctl_push        = 1'b1;
            ctl_msg.valid   = 1'b1;
            ctl_msg.kind    = MSG_LOOKUP;
            ctl_msg.dst     = ob;
            ctl_msg.dst_idx = oi;
            ctl_msg.src     = bank_t'(ID);
            ctl_msg.src_idx = e_idx;
            ctl_msg.map     = lkj;
            ctl_msg.key     = e.key;
            lkj_n = lkj + 1'b1;
          end
        end
      end

      S_VALS: begin
        mb_idx = e_idx;
        x = resolve(e, mb_bits);
        // POS replies for this very entry are taken during the wait.
        if (rsp_valid && rsp_msg.dst_idx == e_idx && rsp_msg.key == e.key && x.pend) begin
          rsp_pop = 1'b1;
          ev_lookup_pos = 1'b1;
          x = resolve(merge_pos(x, rsp_msg, cfg_ws), mb_bits);
        end
        e_n = x;
        if (agg_due(x, cfg_ws, cfg_wa)) begin
          ret_n = (vleft == 0) ? S_WB : S_VALS;
          st_n  = S_AGGF;
        end else if (vleft == 0) begin
          st_n = S_WB;
        end else if (int'(x.nloc) == FLUSH_V) begin
          if (x.pend) ev_stall = 1'b1;
          else st_n = S_FLUSH;
        end else if (single || q_valid) begin
          v = single ? sval : q_flit.data[8*qv +: 8];
          e_n.lbuf[x.nloc[NL_W-2:0]] = v;
          e_n.nloc  = x.nloc + 1'b1;
          e_n.fill  = (x.fill >= cfg_ws) ? cfg_ws : x.fill + 1'b1;
          e_n.since = x.since + 1'b1;
          vleft_n   = vleft - 1'b1;
          if (!single) begin
            qv_n = qv + 1'b1;
            if (qv == 2'd3 || vleft == 1) begin
              q_pop = 1'b1;
              qv_n  = '0;
            end
          end
        end
      end

      S_FLUSH: begin
        wr_valid      = 1'b1;
        wr_req.region = e_addr;
        wr_req.off    = e.tail;
        wr_req.len    = e.nloc;
        wr_req.data   = e.lbuf;
        if (wr_ready) begin
          ev_flush = 1'b1;
          e_n.tail = e.tail + OFF_W'(e.nloc);
          e_n.nloc = '0;
          st_n     = S_VALS;
        end
      end

      S_AGGF: begin
        if (e.nloc == 0) st_n = S_AGGR;
        else begin
          wr_valid      = 1'b1;
          wr_req.region = e_addr;
          wr_req.off    = e.tail;
          wr_req.len    = e.nloc;
          wr_req.data   = e.lbuf;
          if (wr_ready) begin
            ev_flush = 1'b1;
            e_n.tail = e.tail + OFF_W'(e.nloc);
            e_n.nloc = '0;
            st_n     = S_AGGR;
          end
        end
      end

      S_AGGR: begin
        agg_valid      = 1'b1;
        agg_req.key    = e.key;
        agg_req.region = e_addr;
        agg_req.tail   = e.tail;
        agg_req.ws     = cfg_ws;
        if (agg_ready) begin
          e_n.agd   = 1'b1;
          e_n.since = '0;
          st_n      = ret;
        end
      end

      S_WB: begin
        we    = 1'b1;
        wdata = e;
        st_n  = S_IDLE;
      end

      S_LKUP: begin
        // Lookup from the bank that now holds the key under another mapping.
        e_n = rdata;
        e_addr_n = hash_key(lk.key);
        if (rdata.valid && rdata.key == lk.key) st_n = (rdata.nloc != 0) ? S_LKFL : S_LKRSP;
        else begin
          e_n.valid = 1'b0;   // marks "not found" for S_LKRSP; not written back
          e_n.key   = '0;
          st_n      = S_LKRSP;
        end
      end

      S_LKFL: begin
        wr_valid      = 1'b1;
        wr_req.region = e_addr;
        wr_req.off    = e.tail;
        wr_req.len    = e.nloc;
        wr_req.data   = e.lbuf;
        if (wr_ready) begin
          ev_flush = 1'b1;
          e_n.tail = e.tail + OFF_W'(e.nloc);
          e_n.nloc = '0;
          st_n     = S_LKRSP;
        end
      end

      S_LKRSP: begin
        if (ctl_ready) begin
          ctl_push        = 1'b1;
          ctl_msg         = lk;
          ctl_msg.dst     = lk.src;
          ctl_msg.dst_idx = lk.src_idx;
          ctl_msg.src     = bank_t'(ID);
          ctl_msg.src_idx = e_idx;
          if (e.valid) begin
            ctl_msg.kind  = MSG_POS;
            ctl_msg.tail  = e.tail;
            ctl_msg.fill  = e.fill;
            ctl_msg.since = e.since;
            // invalidate the old location
            we         = 1'b1;
            wdata      = '0;
            filt_we    = 1'b1;
            filt_valid = 1'b0;
          end else begin
            ctl_msg.kind = MSG_NEG;
          end
          st_n = S_IDLE;
        end
      end

      S_RESP: begin
        mb_idx = e_idx;
        if (rdata.valid && rdata.key == lk.key && rdata.pend) begin
          ev_lookup_pos = 1'b1;
          e_n      = resolve(merge_pos(rdata, lk, cfg_ws), mb_bits);
          e_addr_n = hash_key(lk.key);
          vleft_n  = '0;
          st_n     = S_VALS;     // runs a due aggregation, then writes back
        end else begin
          st_n = S_IDLE;
        end
      end

      default: st_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st     <= S_IDLE;
      e      <= '0;
      e_idx  <= '0;
      e_addr <= '0;
      r_key  <= '0;
      r_map  <= '0;
      single <= 1'b0;
      sval   <= '0;
      vleft  <= '0;
      qv     <= '0;
      lkj    <= '0;
      lk     <= '0;
      ret    <= S_IDLE;
    end else begin
      st     <= st_n;
      e      <= e_n;
      e_idx  <= e_idx_n;
      e_addr <= e_addr_n;
      r_key  <= r_key_n;
      r_map  <= r_map_n;
      single <= single_n;
      sval   <= sval_n;
      vleft  <= vleft_n;
      qv     <= qv_n;
      lkj    <= lkj_n;
      lk     <= lk_n;
      ret    <= ret_n;
    end

  // Memory contents start invalid.
  initial for (int i = 0; i < S; i++) mem[i] = '0;

endmodule
