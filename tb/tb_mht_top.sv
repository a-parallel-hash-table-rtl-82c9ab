// tb_mht_top: end-to-end test of the whole accelerator at its default sizes
// (8 tuples per cycle, 32 banks of 1K entries, 3 mappings, 10 cache
// stages, 4 compute modules), with the DRAM model on the write port and the
// four read ports. Query 1 (average, minimum, maximum) over windows of 64
// values, aggregated every 32 values.
//
// The stream has three phases:
//   1. hot keys plus uniform random keys (cache hits, merges, overflows);
//   2. keys whose hash addresses all select the same bank under mapping 0,
//      plus 10 % random keys: that bank's queue overloads, the controller
//      changes mapping and keys are looked up and moved between banks;
//   3. as 1, plus keys that collide in the hash and random DRAM stalls.
// Half of the keys send a constant value (a function of the key), so their
// results must be exactly that value; the others send random values, so
// their results must satisfy min <= avg <= max with min and max among the
// values sent for the key. A key never gets more results than its value
// count allows (one at ws values, then one per wa). No more values reach
// DRAM than were sent. Every mechanism must happen at least once: cache
// hit, overflow, replacement and age eviction, link stop, mapping switch,
// bank hit, insertion, filtered lookup, positive lookup, flush, collision
// and aggregation.
module tb_mht_top;
  import mht_pkg::*;

  localparam int WS = 64, WA = 32;
  localparam int CYCLES = 3000;

  logic clk = 0, rst_n = 0;
  logic [WS_W-1:0] cfg_ws = WS_W'(WS), cfg_wa = WS_W'(WA);
  logic [N-1:0] in_valid = '0;
  key_t [N-1:0] in_key = '0;
  val_t [N-1:0] in_val = '0;
  logic in_ready;
  logic wr_valid, wr_ready;
  dram_wr_t wr_req;
  logic [NCOMP-1:0] rd_valid, rd_ready, rd_data_valid;
  addr_t [NCOMP-1:0] rd_region;
  logic [NCOMP-1:0][OFF_W-1:0] rd_off;
  logic [NCOMP-1:0][FLUSH_V-1:0][VAL_W-1:0] rd_data;
  logic [NCOMP-1:0] res_valid, res_ready = '0;
  key_t [NCOMP-1:0] res_key;
  val_t [NCOMP-1:0] res_avg, res_min, res_max;
  logic [B-1:0] coll_valid;
  key_t [B-1:0] coll_key;
  map_t cur_map;
  logic ev_map_switch, ev_link_stop;
  logic [7:0] ev_cache_hit, ev_cache_ovf, ev_cache_repl, ev_cache_age;
  logic [B-1:0] ev_bank_hit, ev_bank_insert, ev_bank_pos, ev_bank_stall, ev_bank_flush, ev_filtered;
  logic stall_wr = 0;

  mht_top dut (.*);

  hbm_model #(.NRD(NCOMP)) u_mem (
    .clk, .stall_wr, .wr_valid, .wr_req, .wr_ready,
    .rd_valid, .rd_region, .rd_off, .rd_ready, .rd_data_valid, .rd_data
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (CYCLES + 30000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per key: values sent, seen value set, results received
  int n_sent [key_t];
  bit seen [key_t][int];
  int n_res [key_t];
  int total_sent = 0;

  function automatic bit const_key(key_t k);
    return k[0];
  endfunction
  function automatic val_t const_val(key_t k);
    return val_t'(k * 37 + 11);
  endfunction

  // mechanism counters
  typedef enum int {
    E_CHIT, E_COVF, E_CREPL, E_CAGE, E_STOP, E_SWITCH, E_BHIT, E_INS,
    E_FILT, E_POS, E_FLUSH, E_COLL, E_AGG, E_NUM
  } ev_e;
  int evc [E_NUM];
  string evn [E_NUM] = '{"cache hit", "cache overflow", "cache replacement", "cache age eviction",
                         "link stop", "mapping switch", "bank hit", "bank insertion",
                         "filtered lookup", "positive lookup", "DRAM flush", "collision",
                         "aggregation"};
  initial for (int i = 0; i < E_NUM; i++) evc[i] = 0;

  always @(posedge clk) if (rst_n) begin
    evc[E_CHIT]  += ev_cache_hit;
    evc[E_COVF]  += ev_cache_ovf;
    evc[E_CREPL] += ev_cache_repl;
    evc[E_CAGE]  += ev_cache_age;
    evc[E_STOP]  += ev_link_stop;
    evc[E_SWITCH] += ev_map_switch;
    evc[E_BHIT]  += $countones(ev_bank_hit);
    evc[E_INS]   += $countones(ev_bank_insert);
    evc[E_FILT]  += $countones(ev_filtered);
    evc[E_POS]   += $countones(ev_bank_pos);
    evc[E_FLUSH] += $countones(ev_bank_flush);
    evc[E_COLL]  += $countones(coll_valid);
    // inputs taken this cycle
    if (in_ready)
      for (int l = 0; l < N; l++)
        if (in_valid[l]) begin
          if (!n_sent.exists(in_key[l])) n_sent[in_key[l]] = 0;
          n_sent[in_key[l]]++;
          seen[in_key[l]][int'(in_val[l])] = 1;
          total_sent++;
        end
    // results
    for (int c = 0; c < NCOMP; c++)
      if (res_valid[c] && res_ready[c]) begin
        key_t k;
        int lim;
        k = res_key[c];
        evc[E_AGG]++;
        if (!n_res.exists(k)) n_res[k] = 0;
        n_res[k]++;
        checks += 3;
        if (!n_sent.exists(k)) begin
          failures++;
          $display("result for unknown key %h", k);
          continue;
        end
        lim = (n_sent[k] < WS) ? 0 : (n_sent[k] - WS) / WA + 1;
        if (n_res[k] > lim) begin
          failures++;
          $display("key %h: %0d results from %0d values", k, n_res[k], n_sent[k]);
        end
        if (const_key(k)) begin
          if (res_avg[c] != const_val(k) || res_min[c] != const_val(k) || res_max[c] != const_val(k)) begin
            failures++;
            $display("key %h: result %0d/%0d/%0d, want %0d", k, res_avg[c], res_min[c], res_max[c], const_val(k));
          end
        end else begin
          if (!(res_min[c] <= res_avg[c] && res_avg[c] <= res_max[c])) failures++;
          if (!seen[k].exists(int'(res_min[c])) || !seen[k].exists(int'(res_max[c]))) begin
            failures++;
            $display("key %h: min %0d / max %0d never sent", k, res_min[c], res_max[c]);
          end
        end
      end
  end

  // key pools
  key_t hot [16];
  key_t skew [256];
  key_t coll [16];

  function automatic key_t pick(int phase);
    int r;
    r = $urandom % 100;
    case (phase)
      1: return (r < 50) ? hot[$urandom % 16] : key_t'($urandom % 32768);
      2: return (r < 90) ? skew[$urandom % 256] : key_t'($urandom % 32768);
      default: return (r < 40) ? hot[$urandom % 16] : (r < 60) ? coll[$urandom % 16] :
                      key_t'($urandom % 32768);
    endcase
  endfunction

  initial begin
    int ns;
    for (int i = 0; i < 16; i++) hot[i] = key_t'(100 + 7 * i);
    ns = 0;
    for (int k = 1; k < 32768 && ns < 256; k++)
      if (hash_key(key_t'(k))[BB-1:0] == 5'd9) skew[ns++] = key_t'(k);
    // colliding pairs: a key below 2^15 and one above with the same address
    for (int i = 0; i < 8; i++) begin
      coll[2*i] = key_t'(200 + i);
      for (int k = 32768; k < 65536; k++)
        if (hash_key(key_t'(k)) == hash_key(coll[2*i])) coll[2*i+1] = key_t'(k);
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < CYCLES; c++) begin
      int phase;
      phase = (c < CYCLES / 3) ? 1 : (c < 2 * CYCLES / 3) ? 2 : 3;
      @(negedge clk);
      res_ready = NCOMP'($urandom);
      stall_wr = (phase == 3) && ($urandom % 4 == 0);
      if (in_ready || !(|in_valid)) begin
        for (int l = 0; l < N; l++) begin
          in_valid[l] = ($urandom % 8) != 0;
          in_key[l] = pick(phase);
          in_val[l] = const_key(in_key[l]) ? const_val(in_key[l]) : val_t'($urandom);
        end
      end
    end
    // let everything drain
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = '0;
    stall_wr = 0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      res_ready = NCOMP'($urandom);
    end
    checks++;
    if (u_mem.values_written > total_sent || u_mem.values_written == 0) begin
      failures++;
      $display("%0d values written for %0d sent", u_mem.values_written, total_sent);
    end
    $display("sent %0d values, %0d keys, %0d written to DRAM", total_sent, n_sent.num(), u_mem.values_written);
    for (int i = 0; i < E_NUM; i++) begin
      $display("  %-20s %0d", evn[i], evc[i]);
      checks++;
      if (evc[i] == 0) begin
        failures++;
        $display("mechanism never happened: %s", evn[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
