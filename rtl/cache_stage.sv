// cache_stage: one stage of the multi-port waterfall cache.
//
// The stage holds N entries (ways) E_0..E_{N-1}, each a key with up to N
// values. Every cycle it takes N multi-value tuples T_0..T_{N-1} (unique
// keys) and compares each with all N entries (N*N key comparators). For the
// tuple in lane i:
//   * hit: its values are appended to the matching entry. If the entry then
//     holds N or more values, the N oldest are evicted in lane i and the rest
//     stay (an entry left with none becomes invalid).
//   * miss: the tuple may replace only entry E_i, and only if it has fewer
//     than N values and its destination bank is busier than that of E_i (or
//     E_i is empty). The old E_i is then evicted in lane i; otherwise the tuple
//     itself passes on in lane i to the next stage.
// Each entry has an age counter, cleared when the entry is written and
// incremented otherwise; at AGE_MAX the entry is evicted in lane i when that
// lane is otherwise empty, so no tuple waits in the cache for long.
// Priority is the load level (0..2) of the bank queue the key maps to under
// the current mapping; levels arrive registered from the bank queues.
//
// Interface: in_t sampled when en is high, out_t registered (latency 1).
// en low freezes entries and outputs. ev_* pulse per lane for statistics.
// Following the document: the decision flow per tuple, the single
// replacement candidate E_i, priority by bank load, N-value overflow, age
// eviction. This design's choices: an entry hit by some lane is not replaced
// in the same cycle, equal priority does not replace, the age limit value.
module cache_stage
  import mht_pkg::*;
#(
  parameter int unsigned AGE_MAX = 15
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  map_t               cur_map,
  input  lvl_t [B-1:0]       bank_lvl,
  input  mtuple_t [N-1:0]    in_t,
  output mtuple_t [N-1:0]    out_t,
  output logic [N-1:0]       ev_hit,
  output logic [N-1:0]       ev_ovf,
  output logic [N-1:0]       ev_repl,
  output logic [N-1:0]       ev_age
);
  mtuple_t [N-1:0]          ent_q, ent_n;
  logic [N-1:0][AGE_W-1:0]  age_q, age_n;
  mtuple_t [N-1:0]          out_n;

  always_comb begin
    logic [N-1:0][N-1:0] h;      // h[i][j]: lane i hits entry j
    logic [N-1:0]        lane_hit, ent_hit, busy;
    logic [2*N-1:0][VAL_W-1:0] comb;
    int unsigned ec, tc, tot;
    lvl_t tl, el;
    comb = '0;
    ec = 0;
    tc = 0;
    tot = 0;
    tl = '0;
    el = '0;
    ent_n   = ent_q;
    age_n   = age_q;
    out_n   = '0;
    ev_hit  = '0;
    ev_ovf  = '0;
    ev_repl = '0;
    ev_age  = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        h[i][j] = in_t[i].valid && ent_q[j].valid && in_t[i].key == ent_q[j].key;
    for (int i = 0; i < N; i++) begin
      lane_hit[i] = |h[i];
      ent_hit[i]  = 1'b0;
      for (int k = 0; k < N; k++) ent_hit[i] |= h[k][i];
    end
    busy = '0;

    // Hits: merge into entry j, evict the N oldest values on overflow.
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        if (h[i][j]) begin
          ec = int'(ent_q[j].cnt);
          tc = int'(in_t[i].cnt);
          tot = ec + tc;
          for (int k = 0; k < 2 * N; k++)
            comb[k] = (k < ec) ? ent_q[j].vals[k]
                    : (k - ec < N) ? in_t[i].vals[(k - ec) % N] : '0;
          ev_hit[i] = 1'b1;
          age_n[j]  = '0;
          if (tot >= N) begin
            ev_ovf[i]       = 1'b1;
            busy[i]         = 1'b1;
            out_n[i]        = ent_q[j];
            out_n[i].cnt    = CNT_W'(N);
            for (int k = 0; k < N; k++) out_n[i].vals[k] = comb[k];
            ent_n[j].cnt    = CNT_W'(tot - N);
            ent_n[j].vals   = '0;
            for (int k = 0; k < N; k++) ent_n[j].vals[k] = comb[k+N];
            if (tot == N) ent_n[j] = '0;
          end else begin
            ent_n[j].cnt = CNT_W'(tot);
            for (int k = 0; k < N; k++) ent_n[j].vals[k] = comb[k];
          end
        end
      end
    end

    // Misses: replace E_i or pass the tuple on.
    for (int i = 0; i < N; i++) begin
      if (in_t[i].valid && !lane_hit[i]) begin
        tl = bank_lvl[map_bank(in_t[i].addr, cur_map)];
        el = bank_lvl[map_bank(ent_q[i].addr, cur_map)];
        busy[i] = 1'b1;
        if (!ent_hit[i] && int'(in_t[i].cnt) < N && (!ent_q[i].valid || tl > el)) begin
          ev_repl[i] = ent_q[i].valid;
          out_n[i]   = ent_q[i];
          ent_n[i]   = in_t[i];
          age_n[i]   = '0;
        end else begin
          out_n[i] = in_t[i];
        end
      end
    end

    // Ageing of entries not touched this cycle.
    for (int i = 0; i < N; i++) begin
      if (ent_q[i].valid && !ent_hit[i] && ent_n[i] == ent_q[i]) begin
        if (int'(age_q[i]) >= AGE_MAX && !busy[i]) begin
          ev_age[i] = 1'b1;
          out_n[i]  = ent_q[i];
          ent_n[i]  = '0;
          age_n[i]  = '0;
        end else if (int'(age_q[i]) < AGE_MAX) begin
          age_n[i] = age_q[i] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ent_q <= '0;
      age_q <= '0;
      out_t <= '0;
    end else if (en) begin
      ent_q <= ent_n;
      age_q <= age_n;
      out_t <= out_n;
    end

endmodule
