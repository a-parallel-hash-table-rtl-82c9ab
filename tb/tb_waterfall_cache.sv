// tb_waterfall_cache: self-checking test of the P-stage waterfall cache.
// Streams random multi-value tuples (unique keys per cycle, drawn from a
// small key set so entries are hit, merged and overflow) with random bank
// priority levels and random pipeline stalls, then idles until the cache is
// empty. Checks: every value leaves exactly once, under its key, with the
// values of each key in arrival order; no value stays longer than
// P * ((N - 1) * (AGE_MAX + 1) + 1) enabled cycles (per stage at most N - 1
// hits, each at most AGE_MAX idle cycles apart, before overflow or age-out);
// every mechanism (hit, overflow, replacement, age eviction) happens.
module tb_waterfall_cache;
  import mht_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  map_t cur_map = '0;
  lvl_t [B-1:0] bank_lvl = '0;
  mtuple_t [N-1:0] in_t = '0, out_t;
  logic [7:0] ev_hit_cnt, ev_ovf_cnt, ev_repl_cnt, ev_age_cnt;

  waterfall_cache dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NKEYS = 40;
  localparam int MAXRES = P * ((N - 1) * (15 + 1) + 1);
  int max_res = 0;

  // per key: queue of (value, entry cycle) still expected
  int exp_v [NKEYS][$];
  int exp_t [NKEYS][$];
  int cyc = 0;
  int n_hit = 0, n_ovf = 0, n_repl = 0, n_age = 0;
  int seq = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (en) cyc <= cyc + 1;

  // Output checker: sample at each enabled edge the batch leaving the cache.
  always @(posedge clk) if (rst_n && en) begin
    n_hit  += ev_hit_cnt;
    n_ovf  += ev_ovf_cnt;
    n_repl += ev_repl_cnt;
    n_age  += ev_age_cnt;
    for (int l = 0; l < N; l++)
      if (out_t[l].valid) begin
        int k;
        k = int'(out_t[l].key);
        for (int q = 0; q < int'(out_t[l].cnt); q++) begin
          checks++;
          if (k >= NKEYS || exp_v[k].size() == 0) begin
            failures++;
            $display("unexpected value for key %0d", k);
          end else begin
            if (int'(out_t[l].vals[q]) != exp_v[k][0]) begin
              failures++;
              $display("key %0d: value %0d, expected %0d", k, out_t[l].vals[q], exp_v[k][0]);
            end
            if (cyc - exp_t[k][0] > max_res) max_res = cyc - exp_t[k][0];
            if (cyc - exp_t[k][0] > MAXRES) begin
              failures++;
              $display("key %0d: value stayed %0d cycles", k, cyc - exp_t[k][0]);
            end
            void'(exp_v[k].pop_front());
            void'(exp_t[k].pop_front());
          end
        end
      end
  end

  initial begin
    int keys [N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000 + 2 * MAXRES; c++) begin
      @(negedge clk);
      en = ($urandom % 6) != 0;
      if (c % 50 == 0)
        for (int b = 0; b < B; b++) bank_lvl[b] = lvl_t'($urandom % 3);
      in_t = '0;
      if (c < 3000 && en) begin
        for (int l = 0; l < N; l++) begin
          logic dup;
          keys[l] = (c % 400 < 200) ? $urandom % NKEYS : $urandom % 12;
          dup = 0;
          for (int o = 0; o < l; o++) if (keys[o] == keys[l]) dup = 1;
          if (!dup && ($urandom % 4) != 0) begin
            int n;
            n = 1 + $urandom % ((c % 3 == 0) ? N : 3);
            in_t[l].valid = 1'b1;
            in_t[l].key   = key_t'(keys[l]);
            in_t[l].addr  = hash_key(key_t'(keys[l]));
            in_t[l].cnt   = CNT_W'(n);
            for (int q = 0; q < n; q++) begin
              in_t[l].vals[q] = val_t'(seq);
              exp_v[keys[l]].push_back(seq % 256);
              exp_t[keys[l]].push_back(cyc);
              seq++;
            end
          end
        end
      end
    end
    @(negedge clk);
    en = 0;
    for (int k = 0; k < NKEYS; k++) begin
      checks++;
      if (exp_v[k].size() != 0) begin
        failures++;
        $display("key %0d: %0d values never left", k, exp_v[k].size());
      end
    end
    $display("max residency %0d enabled cycles", max_res);
    $display("hits %0d overflows %0d replacements %0d age evictions %0d", n_hit, n_ovf, n_repl, n_age);
    checks += 4;
    if (n_hit == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_repl == 0) failures++;
    if (n_age == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
