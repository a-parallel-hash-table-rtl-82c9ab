// tb_hash_bank: self-checking test of one hash table bank (bank 0) with its
// surroundings modelled here: a request queue, the ring (lookup messages
// are collected, replies are delivered as miss-table bits or POS replies),
// the DRAM model (with random write stalls) and a randomly busy compute
// stage. Window size 128, aggregation every 64 values.
//   A: key KA is inserted (two lookups to the other mappings' bank and
//      index), both answered negative; 255 values follow in random packet
//      sizes. Checked: the values land in DRAM in order at the key's
//      region, aggregations are requested exactly when the window first
//      holds 128 values and 64 values later (tails 128 and 192). A lookup
//      from another bank then finds KA: the rest is flushed and a POS reply
//      carries tail 255, fill 128, since 63; the entry is invalidated.
//   B: a lookup for an absent key gets a NEG reply.
//   C: key KC gets no answers: after 64 values the bank stalls. A POS reply
//      (tail 500, fill 100) and a NEG bit release it: the window is full, so
//      the 64 buffered values are flushed at offset 500 and an aggregation
//      with tail 564 follows.
//   D: key KD with the same hash address as KC evicts it: KC's buffered
//      values are flushed to KC's region and the collision is reported.
module tb_hash_bank;
  import mht_pkg::*;

  localparam int WS = 128, WA = 64;
  logic clk = 0, rst_n = 0;
  logic [WS_W-1:0] cfg_ws = WS_W'(WS), cfg_wa = WS_W'(WA);
  logic q_valid, q_is_lk, q_pop;
  flit_t q_flit;
  ring_msg_t q_msg;
  logic ctl_push, ctl_ready = 1;
  ring_msg_t ctl_msg;
  logic rsp_valid, rsp_pop;
  ring_msg_t rsp_msg;
  logic filt_we, filt_valid, mb_clr;
  idx_t filt_idx, mb_idx;
  logic [TAG_W-1:0] filt_tag;
  logic [M-1:0] mb_bits;
  logic wr_valid, wr_ready, stall_wr = 0;
  dram_wr_t wr_req;
  logic agg_valid, agg_ready = 1;
  agg_req_t agg_req;
  logic coll_valid;
  key_t coll_key;
  logic ev_hit, ev_insert, ev_lookup_pos, ev_stall, ev_flush;

  hash_bank #(.ID(0)) dut (.*);

  logic [0:0] rd_dv;
  logic [0:0][FLUSH_V-1:0][VAL_W-1:0] rd_d;
  logic [0:0] rd_rdy;
  hbm_model #(.NRD(1)) u_mem (
    .clk, .stall_wr, .wr_valid, .wr_req, .wr_ready,
    .rd_valid(1'b0), .rd_region('0), .rd_off('0), .rd_ready(rd_rdy),
    .rd_data_valid(rd_dv), .rd_data(rd_d)
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- environment models
  typedef struct { logic lk; flit_t f; ring_msg_t m; } qitem_t;
  qitem_t qq [$];
  ring_msg_t rq [$];
  ring_msg_t sent [$];
  agg_req_t aggs [$];
  key_t colls [$];
  logic [M-1:0] mbt [S];
  int n_stall = 0, n_ins = 0, n_hit = 0;

  assign q_valid = qq.size() != 0;
  assign q_is_lk = q_valid ? qq[0].lk : 1'b0;
  assign q_flit  = q_valid ? qq[0].f : '0;
  assign q_msg   = q_valid ? qq[0].m : '0;
  assign rsp_valid = rq.size() != 0;
  assign rsp_msg   = rsp_valid ? rq[0] : '0;
  assign mb_bits   = mbt[mb_idx];

  initial for (int i = 0; i < S; i++) mbt[i] = '0;

  always @(posedge clk) if (rst_n) begin
    if (q_pop) begin
      chk(q_valid, "pop from empty queue");
      if (q_valid) void'(qq.pop_front());
    end
    if (rsp_pop) void'(rq.pop_front());
    if (ctl_push) sent.push_back(ctl_msg);
    if (mb_clr) mbt[mb_idx] <= '0;
    if (agg_valid && agg_ready) aggs.push_back(agg_req);
    if (coll_valid) colls.push_back(coll_key);
    n_stall += ev_stall;
    n_ins += ev_insert;
    n_hit += ev_hit;
    stall_wr <= ($urandom % 4) == 0;
    agg_ready <= ($urandom % 3) != 0;
  end

  task automatic send_pkt(key_t k, int first, int n);
    qitem_t it;
    it.lk = 0;
    it.m = '0;
    it.f = '0;
    it.f.valid = 1;
    it.f.head = 1;
    it.f.map = '0;
    it.f.bank = '0;
    it.f.last = n == 1;
    it.f.data = {k, (n == 1) ? val_t'(first) : val_t'(n)};
    qq.push_back(it);
    if (n > 1)
      for (int b = 0; b < (n + 3) / 4; b++) begin
        it.f.head = 0;
        it.f.last = b == (n + 3) / 4 - 1;
        it.f.data = '0;
        for (int q = 0; q < 4; q++) if (4 * b + q < n) it.f.data[8*q +: 8] = val_t'(first + 4 * b + q);
        qq.push_back(it);
      end
  endtask

  task automatic send_lookup(key_t k, int idx);
    qitem_t it;
    it.lk = 1;
    it.f = '0;
    it.m = '0;
    it.m.valid = 1;
    it.m.kind = MSG_LOOKUP;
    it.m.dst = '0;
    it.m.dst_idx = idx_t'(idx);
    it.m.src = 5'd17;
    it.m.src_idx = 10'd99;
    it.m.map = 2'd1;
    it.m.key = k;
    qq.push_back(it);
  endtask

  task automatic drain(int cycles);
    int c;
    c = 0;
    while ((qq.size() != 0 || rq.size() != 0 || dut.st != dut.S_IDLE) && c < cycles) begin
      @(posedge clk);
      c++;
    end
    repeat (3) @(posedge clk);
  endtask

  function automatic key_t find_key(int from);
    for (int k = from; k < 32768; k++) begin
      addr_t a;
      a = hash_key(key_t'(k));
      if (map_bank(a, 0) == 0 && map_bank(a, 1) != 0 && map_bank(a, 2) != 0) return key_t'(k);
    end
    return '0;
  endfunction

  initial begin
    key_t ka, kc, kd, kb;
    addr_t aa, ac;
    int n, idx;
    ka = find_key(1);
    kc = find_key(int'(ka) + 1);
    kb = find_key(int'(kc) + 1);
    aa = hash_key(ka);
    ac = hash_key(kc);
    kd = '0;
    for (int k = 32768; k < 65536; k++) if (hash_key(key_t'(k)) == ac) kd = key_t'(k);
    chk(kd != 0, "colliding key found");

    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- A: insert KA
    send_pkt(ka, 0, 5);
    repeat (20) @(posedge clk);
    chk(n_ins == 1, "KA inserted");
    chk(sent.size() == 2, "two lookups sent");
    for (int j = 0; j < sent.size(); j++) begin
      int mp;
      mp = int'(sent[j].map);
      chk(sent[j].kind == MSG_LOOKUP && mp == j + 1 && sent[j].dst == map_bank(aa, map_t'(mp)) &&
          sent[j].dst_idx == map_idx(aa, map_t'(mp)) && sent[j].src == 0 &&
          sent[j].src_idx == map_idx(aa, 0) && sent[j].key == ka, "lookup message fields");
    end
    sent = {};
    idx = int'(map_idx(aa, 0));
    mbt[idx] = 3'b110;     // both answered negative
    n = 5;
    while (n < 255) begin
      int c;
      c = 1 + $urandom % N;
      if (n + c > 255) c = 255 - n;
      send_pkt(ka, n, c);
      n += c;
    end
    drain(5000);
    chk(n_hit > 10, "hits counted");
    chk(aggs.size() == 2, "two aggregations");
    if (aggs.size() == 2) begin
      chk(aggs[0].tail == 128 && aggs[0].ws == WS && aggs[0].region == aa && aggs[0].key == ka, "first aggregation at 128");
      chk(aggs[1].tail == 192, "second aggregation 64 values later");
    end
    aggs = {};
    // lookup from bank 17: POS with the pointers
    send_lookup(ka, idx);
    drain(1000);
    chk(sent.size() == 1, "one reply");
    if (sent.size() == 1)
      chk(sent[0].kind == MSG_POS && sent[0].dst == 17 && sent[0].dst_idx == 99 &&
          sent[0].tail == 255 && sent[0].fill == WS && sent[0].since == 63, "POS reply contents");
    sent = {};
    for (int i = 0; i < 255; i++) chk(u_mem.peek(aa, i) == val_t'(i), "window value in DRAM");
    chk(!dut.mem[idx].valid, "entry invalidated");

    // ---- B: absent key
    send_lookup(kb, int'(map_idx(hash_key(kb), 0)));
    drain(1000);
    chk(sent.size() == 1 && sent[0].kind == MSG_NEG, "NEG reply");
    sent = {};

    // ---- C: KC pending, stall, released by POS
    send_pkt(kc, 0, 1);
    n = 1;
    while (n < 70) begin
      send_pkt(kc, n, 4);
      n += 4;
    end
    repeat (400) @(posedge clk);
    chk(n_stall > 0, "bank stalls while pending with a full buffer");
    chk(u_mem.writes == 4, "no flush while pending");
    begin
      ring_msg_t p;
      p = '0;
      p.valid = 1;
      p.kind = MSG_POS;
      p.dst = 0;
      p.dst_idx = map_idx(ac, 0);
      p.map = 2'd1;
      p.key = kc;
      p.tail = 10'd500;
      p.fill = 11'd100;
      p.since = 11'd40;
      @(negedge clk);
      mbt[int'(map_idx(ac, 0))][2] = 1'b1;
      rq.push_back(p);
    end
    drain(2000);
    chk(aggs.size() == 1 && aggs[0].tail == 564, "aggregation after hand-over");
    for (int i = 0; i < 64; i++) chk(u_mem.peek(ac, 500 + i) == val_t'(i), "KC values after old tail");
    chk(dut.mem[int'(map_idx(ac, 0))].nloc == 9 && dut.mem[int'(map_idx(ac, 0))].tail == 564, "KC buffer");

    // ---- D: collision
    send_pkt(kd, 200, 1);
    drain(1000);
    chk(colls.size() == 1 && colls[0] == kc, "collision reported");
    for (int i = 0; i < 9; i++) chk(u_mem.peek(ac, 564 + i) == val_t'(64 + i), "evicted values flushed");
    chk(dut.mem[int'(map_idx(ac, 0))].key == kd, "KD in the entry");
    $display("hits %0d inserts %0d stall cycles %0d writes %0d", n_hit, n_ins, n_stall, u_mem.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
