// sort_merge: first stage of the Multi Hash Table. Takes up to N key-value
// tuples per cycle, sorts them by key and merges tuples of equal key into one
// multi-value tuple <k, v1, v2, ...>.
//
// Sorting is a bitonic network with a register after every compare-exchange
// layer (log2(N)*(log2(N)+1)/2 = 6 layers for N = 8), then one more register
// for the merge. Latency is therefore 7 cycles at N = 8, throughput one batch
// per cycle. The sort key is the tuple key rotated left by a pseudo-random
// amount from an LFSR, new for every batch: equal keys still end up next to
// each other, but the order of different keys is shuffled, which spreads keys
// over the cache ways of the next stage. Invalid lanes sort to the end.
//
// Output lane i carries a merged tuple when lane i holds the first tuple of a
// group of equal keys; the values of the group are packed in that lane, in
// input order, and the other lanes of the group are left invalid. The lane
// positions are thus those of the sorted stream (as in the example of the
// merge step, where the merged key keeps the first of its positions).
// The hash address of the key is attached to every output tuple.
//
// Interface: in_valid/in_key/in_val sampled when en is high; out_* valid
// 7 cycles (enabled cycles) later. en low freezes the whole pipeline.
// Following the document: sort, rotation by an LFSR value, merge. This
// design's choices: bitonic network for every N (the document uses an optimal
// network where one exists), stable ordering of equal keys by input lane.
module sort_merge
  import mht_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [N-1:0]             in_valid,
  input  key_t [N-1:0]             in_key,
  input  val_t [N-1:0]             in_val,
  output mtuple_t [N-1:0]          out_t
);
  localparam int unsigned LAYERS = LOG_N * (LOG_N + 1) / 2;

  typedef struct packed {
    logic             inval;   // 1 = empty lane, sorts last
    key_t             rkey;    // rotated key (sort key)
    logic [LOG_N-1:0] lane;    // input lane, keeps equal keys in input order
    key_t             key;
    val_t             val;
  } elem_t;

  // LFSR for the rotation amount (x^16 + x^14 + x^13 + x^11 + 1).
  logic [15:0] lfsr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lfsr <= 16'hACE1;
    else if (en) lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};

  function automatic key_t rotl(key_t k, int unsigned r);
    return key_t'((k << r) | (k >> (KEY_W - r)));
  endfunction

  elem_t [N-1:0] lay_in;
  always_comb begin
    int unsigned r;
    r = int'(lfsr[4:0]) % KEY_W;
    for (int i = 0; i < N; i++) begin
      lay_in[i].inval = !in_valid[i];
      lay_in[i].rkey  = (r == 0) ? in_key[i] : rotl(in_key[i], r);
      lay_in[i].lane  = LOG_N'(i);
      lay_in[i].key   = in_key[i];
      lay_in[i].val   = in_val[i];
    end
  end

  function automatic logic gt(elem_t a, elem_t b);
    return {a.inval, a.rkey, a.lane} > {b.inval, b.rkey, b.lane};
  endfunction

  elem_t [N-1:0] lay_q [LAYERS+1];
  assign lay_q[0] = lay_in;

  // Bitonic network, one register per layer.
  for (genvar kk = 1; kk <= LOG_N; kk++) begin : g_k
    for (genvar jj = kk - 1; jj >= 0; jj--) begin : g_j
      localparam int L = (kk - 1) * kk / 2 + (kk - 1 - jj);
      elem_t [N-1:0] nxt;
      always_comb begin
        nxt = lay_q[L];
        for (int i = 0; i < N; i++) begin
          int l;
          logic up;
          l  = i ^ (1 << jj);
          up = ((i & (1 << kk)) == 0);
          if (l > i) begin
            if (gt(lay_q[L][i], lay_q[L][l]) == up) begin
              nxt[i] = lay_q[L][l];
              nxt[l] = lay_q[L][i];
            end
          end
        end
      end
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) lay_q[L+1] <= '{default: '0};
        else if (en) lay_q[L+1] <= nxt;
    end
  end

  // Merge: the first tuple of each run of equal keys collects the run.
  elem_t [N-1:0] srt;
  assign srt = lay_q[LAYERS];
  mtuple_t [N-1:0] mrg;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic run;
      mrg[i]       = '0;
      mrg[i].valid = !srt[i].inval && (i == 0 || srt[i-1].inval || srt[i-1].key != srt[i].key);
      mrg[i].key   = srt[i].key;
      mrg[i].addr  = hash_key(srt[i].key);
      run = mrg[i].valid;
      for (int k = 0; k < N; k++) begin
        if (i + k < N) begin
          run = run && !srt[i+k].inval && srt[i+k].key == srt[i].key;
          if (run) begin
            mrg[i].vals[k] = srt[i+k].val;
            mrg[i].cnt     = CNT_W'(k + 1);
          end
        end
      end
      if (!mrg[i].valid) mrg[i] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_t <= '0;
    else if (en) out_t <= mrg;

endmodule
