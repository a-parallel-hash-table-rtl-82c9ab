// waterfall_cache: the N-port cache in front of the hash table banks, built
// as a pipeline of P small fully associative stages (cache_stage) of N
// entries each. Whatever a stage does not keep (misses that lose the
// replacement, evicted entries, overflowing values) flows to the next stage
// in the same lane, where it can be cached or merged again, like a
// waterfall. What leaves the last stage goes to the banks. A key may occupy
// one entry in several stages at the same time.
//
// Interface: in_t sampled when en is high; out_t is the last stage's output,
// P cycles later. cur_map and bank_lvl feed the priority decision of every
// stage. The ev_*_cnt outputs count, per cycle, the hits, overflow
// evictions, replacements and age evictions of all stages together.
// Following the document: P = 10 stages of N = 8 entries (80 entries).
module waterfall_cache
  import mht_pkg::*;
#(
  parameter int unsigned STAGES  = P,
  parameter int unsigned AGE_MAX = 15
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  map_t               cur_map,
  input  lvl_t [B-1:0]       bank_lvl,
  input  mtuple_t [N-1:0]    in_t,
  output mtuple_t [N-1:0]    out_t,
  output logic [7:0]         ev_hit_cnt,
  output logic [7:0]         ev_ovf_cnt,
  output logic [7:0]         ev_repl_cnt,
  output logic [7:0]         ev_age_cnt
);
  mtuple_t [N-1:0] lane [STAGES+1];
  logic [STAGES-1:0][N-1:0] hit, ovf, repl, agev;

  assign lane[0] = in_t;

  for (genvar s = 0; s < STAGES; s++) begin : g_st
    cache_stage #(.AGE_MAX(AGE_MAX)) u_stage (
      .clk, .rst_n, .en, .cur_map, .bank_lvl,
      .in_t   (lane[s]),
      .out_t  (lane[s+1]),
      .ev_hit (hit[s]),
      .ev_ovf (ovf[s]),
      .ev_repl(repl[s]),
      .ev_age (agev[s])
    );
  end

  assign out_t = lane[STAGES];

  always_comb begin
    ev_hit_cnt  = '0;
    ev_ovf_cnt  = '0;
    ev_repl_cnt = '0;
    ev_age_cnt  = '0;
    for (int s = 0; s < STAGES; s++)
      for (int i = 0; i < N; i++) begin
        ev_hit_cnt  += 8'(hit[s][i]  & en);
        ev_ovf_cnt  += 8'(ovf[s][i]  & en);
        ev_repl_cnt += 8'(repl[s][i] & en);
        ev_age_cnt  += 8'(agev[s][i] & en);
      end
  end

endmodule
