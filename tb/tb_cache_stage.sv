// tb_cache_stage: directed, self-checking test of one waterfall cache stage.
// Replays the merge/evict example of the cache decision flow with N = 8:
// entries k4 {4,5}, k2 {0..6}, k3 {0} are installed; then k1 misses and
// loses to the busier k4 (passes on), k2 reaches N values and is evicted
// whole, k3 collects two more values, and a full tuple (N values) is never
// cached. Then a busier key replaces k4, k3 overflows keeping one value, and
// the age counter flushes the remaining entries after AGE_MAX idle cycles.
module tb_cache_stage;
  import mht_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  map_t cur_map = '0;
  lvl_t [B-1:0] bank_lvl = '0;
  mtuple_t [N-1:0] in_t = '0, out_t;
  logic [N-1:0] ev_hit, ev_ovf, ev_repl, ev_age;

  cache_stage dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mtuple_t mk(key_t k, int first, int n);
    mtuple_t t;
    t = '0;
    t.valid = 1'b1;
    t.key   = k;
    t.addr  = hash_key(k);
    t.cnt   = CNT_W'(n);
    for (int q = 0; q < n; q++) t.vals[q] = val_t'(first + q);
    return t;
  endfunction

  task automatic expect_lane(int l, logic v, key_t k, int first, int n);
    checks++;
    if (out_t[l].valid != v || (v && (out_t[l].key != k || int'(out_t[l].cnt) != n))) begin
      failures++;
      $display("lane %0d: got v=%0d key=%0d cnt=%0d, want v=%0d key=%0d cnt=%0d",
               l, out_t[l].valid, out_t[l].key, out_t[l].cnt, v, k, n);
    end else if (v)
      for (int q = 0; q < n; q++) begin
        checks++;
        if (out_t[l].vals[q] != val_t'(first + q)) begin
          failures++;
          $display("lane %0d value %0d = %0d, want %0d", l, q, out_t[l].vals[q], first + q);
        end
      end
  endtask

  task automatic step(input mtuple_t [N-1:0] t);
    @(negedge clk);
    in_t = t;
    en   = 1'b1;
    @(posedge clk);
    #1;
    in_t = '0;
  endtask

  function automatic bank_t bk(key_t k);
    return map_bank(hash_key(k), cur_map);
  endfunction

  localparam key_t K1 = 24'd1, K2 = 24'd2, K3 = 24'd3, K4 = 24'd4, K5 = 24'd5, K6 = 24'd6;

  initial begin
    mtuple_t [N-1:0] t;
    int age_seen;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (bk(K1) == bk(K4) || bk(K5) == bk(K4)) begin
      failures++;
      $display("test keys share a bank");
    end
    bank_lvl[bk(K4)] = 2'd2;

    // install k4 {4,5}, k2 {0..6}, k3 {0}
    t = '0;
    t[0] = mk(K4, 4, 2);
    t[1] = mk(K2, 0, 7);
    t[3] = mk(K3, 0, 1);
    step(t);
    for (int l = 0; l < N; l++) expect_lane(l, 0, 0, 0, 0);

    // k1 misses, k2 overflows, k3 merges, k6 (N values) passes
    t = '0;
    t[0] = mk(K1, 0, 1);
    t[1] = mk(K2, 7, 1);
    t[2] = mk(K3, 1, 2);
    t[5] = mk(K6, 10, N);
    step(t);
    expect_lane(0, 1, K1, 0, 1);
    expect_lane(1, 1, K2, 0, N);
    expect_lane(2, 0, 0, 0, 0);
    expect_lane(3, 0, 0, 0, 0);
    expect_lane(5, 1, K6, 10, N);
    checks++;
    if (dut.ent_q[1].valid || !dut.ent_q[3].valid || dut.ent_q[3].cnt != 3) failures++;

    // en low freezes everything
    @(negedge clk);
    en = 0;
    in_t[0] = mk(K1, 0, 1);
    repeat (3) @(posedge clk);
    #1;
    expect_lane(0, 1, K1, 0, 1);
    expect_lane(1, 1, K2, 0, N);

    // k5 on a busier bank replaces k4, which is evicted
    bank_lvl[bk(K4)] = 2'd0;
    bank_lvl[bk(K5)] = 2'd1;
    t = '0;
    t[0] = mk(K5, 20, 3);
    step(t);
    expect_lane(0, 1, K4, 4, 2);

    // k3 {0,1,2} + {3..8} = 9 values: {0..7} out, {8} stays
    t = '0;
    t[3] = mk(K3, 3, 6);
    step(t);
    expect_lane(3, 1, K3, 0, N);
    checks++;
    if (dut.ent_q[3].cnt != 1 || dut.ent_q[3].vals[0] != 8) failures++;

    // idle: entries age out after AGE_MAX cycles
    age_seen = 0;
    for (int c = 1; c <= 20; c++) begin
      step('0);
      if (out_t[3].valid) begin
        expect_lane(3, 1, K3, 8, 1);
        checks++;
        if (c != 16) begin
          failures++;
          $display("k3 aged out after %0d idle cycles", c);
        end
        age_seen++;
      end
      if (out_t[0].valid) begin
        expect_lane(0, 1, K5, 20, 3);
        age_seen++;
      end
    end
    checks++;
    if (age_seen != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
