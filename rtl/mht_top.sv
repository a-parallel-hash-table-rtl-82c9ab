// mht_top: stream aggregation accelerator built around the Multi Hash Table,
// a hash table with N ports made of B single-port banks.
//
// Data path, in order:
//   sort_merge      N tuples/cycle sorted (LFSR-shuffled key order) and
//                   merged into multi-value tuples, hash address attached.
//   waterfall_cache P stages of N entries that merge requests to the same
//                   key, keeping keys of busy banks first.
//   serializer      evictions packed into flit packets on N lanes, each
//                   packet addressed to its bank under the current mapping.
//   link            LINK_STAGES register stages of N flit lanes, seen by all
//                   banks.
//   bank_queue      per bank, parallel-in serial-out queue of packets and
//                   ring lookups.
//   hash_bank       per bank, SRAM entries updated by read-modify-write,
//                   flushes to DRAM and aggregation requests.
//   ring_node       per bank, stop on the inter-bank ring that carries
//                   lookups and replies when keys move between mappings.
//   map_ctrl        current mapping, bank priority levels.
//   compute_q1      NCOMP = N/2 modules computing avg/min/max of windows.
// DRAM (HBM in the original system) is outside: one write port shared by
// all banks (round-robin) and one read port per compute module.
//
// Flow control: the front end (sorting, cache, serializer input) advances
// together when every serializer lane can take a tuple (in_ready = 1);
// a batch on in_* is taken in a cycle with in_ready high. The serializer
// stops sending flits while any bank queue lane is nearly full; the link
// then drains into the margin kept free.
//
// The ev_* outputs are per-cycle event signals for monitoring.
module mht_top
  import mht_pkg::*;
#(
  parameter int unsigned LINK_STAGES = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [WS_W-1:0]                    cfg_ws,
  input  logic [WS_W-1:0]                    cfg_wa,
  // input stream
  input  logic [N-1:0]                       in_valid,
  input  key_t [N-1:0]                       in_key,
  input  val_t [N-1:0]                       in_val,
  output logic                               in_ready,
  // DRAM write port
  output logic                               wr_valid,
  output dram_wr_t                           wr_req,
  input  logic                               wr_ready,
  // DRAM read ports, one per compute module
  output logic [NCOMP-1:0]                   rd_valid,
  output addr_t [NCOMP-1:0]                  rd_region,
  output logic [NCOMP-1:0][OFF_W-1:0]        rd_off,
  input  logic [NCOMP-1:0]                   rd_ready,
  input  logic [NCOMP-1:0]                   rd_data_valid,
  input  logic [NCOMP-1:0][FLUSH_V-1:0][VAL_W-1:0] rd_data,
  // aggregation results
  output logic [NCOMP-1:0]                   res_valid,
  output key_t [NCOMP-1:0]                   res_key,
  output val_t [NCOMP-1:0]                   res_avg,
  output val_t [NCOMP-1:0]                   res_min,
  output val_t [NCOMP-1:0]                   res_max,
  input  logic [NCOMP-1:0]                   res_ready,
  // hash collisions (a valid entry replaced by another key)
  output logic [B-1:0]                       coll_valid,
  output key_t [B-1:0]                       coll_key,
  // monitoring
  output map_t                               cur_map,
  output logic                               ev_map_switch,
  output logic [7:0]                         ev_cache_hit,
  output logic [7:0]                         ev_cache_ovf,
  output logic [7:0]                         ev_cache_repl,
  output logic [7:0]                         ev_cache_age,
  output logic                               ev_link_stop,
  output logic [B-1:0]                       ev_bank_hit,
  output logic [B-1:0]                       ev_bank_insert,
  output logic [B-1:0]                       ev_bank_pos,
  output logic [B-1:0]                       ev_bank_stall,
  output logic [B-1:0]                       ev_bank_flush,
  output logic [B-1:0]                       ev_filtered
);
  logic go, send;
  lvl_t [B-1:0] bank_lvl;
  logic [B-1:0][9:0] bload;
  logic [B-1:0] near_full;

  // ------------------------------------------------------------ front end
  mtuple_t [N-1:0] sm_out, wc_out;
  logic ser_ready;

  assign go       = ser_ready;
  assign in_ready = go;

  sort_merge u_sm (
    .clk, .rst_n, .en(go),
    .in_valid, .in_key, .in_val,
    .out_t(sm_out)
  );

  logic [N-1:0] sm_valid;
  addr_t [N-1:0] sm_addr;
  always_comb
    for (int i = 0; i < N; i++) begin
      sm_valid[i] = sm_out[i].valid && go;
      sm_addr[i]  = sm_out[i].addr;
    end

  map_ctrl u_map (
    .clk, .rst_n,
    .addr_valid(sm_valid), .addr(sm_addr),
    .load(bload), .cur_map, .bank_lvl, .switched(ev_map_switch)
  );

  waterfall_cache u_wc (
    .clk, .rst_n, .en(go), .cur_map, .bank_lvl,
    .in_t(sm_out), .out_t(wc_out),
    .ev_hit_cnt(ev_cache_hit), .ev_ovf_cnt(ev_cache_ovf),
    .ev_repl_cnt(ev_cache_repl), .ev_age_cnt(ev_cache_age)
  );

  flit_t [N-1:0] ser_f;
  logic [N-1:0][$clog2(8):0] ser_occ;
  assign send = !(|near_full);

  serializer u_ser (
    .clk, .rst_n, .take(go), .send, .cur_map,
    .in_t(wc_out), .ready(ser_ready), .out_f(ser_f), .occ(ser_occ)
  );

  always_comb begin
    ev_link_stop = 1'b0;
    for (int l = 0; l < N; l++) if (ser_occ[l] != 0 && !send) ev_link_stop = 1'b1;
  end

  // ----------------------------------------------------------------- link
  flit_t [N-1:0] lnk [LINK_STAGES+1];
  assign lnk[0] = ser_f;
  for (genvar s = 0; s < LINK_STAGES; s++) begin : g_link
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) lnk[s+1] <= '0;
      else        lnk[s+1] <= lnk[s];
  end

  // ---------------------------------------------------------------- banks
  ring_msg_t [B-1:0] rout;
  logic     [B-1:0] b_wr_valid, b_agg_valid, b_wr_ready, b_agg_ready;
  dram_wr_t [B-1:0] b_wr_req;
  agg_req_t [B-1:0] b_agg_req;

  for (genvar b = 0; b < B; b++) begin : g_bank
    logic      lk_valid, lk_ready, q_valid, q_is_lk, q_pop;
    ring_msg_t lk_msg, q_msg, ctl_msg, rsp_msg;
    flit_t     q_flit;
    logic      ctl_push, ctl_ready, rsp_valid, rsp_pop;
    logic      filt_we, filt_valid, mb_clr;
    idx_t      filt_idx, mb_idx;
    logic [TAG_W-1:0] filt_tag;
    logic [M-1:0] mb_bits;

    bank_queue u_q (
      .clk, .rst_n, .bank_id(bank_t'(b)),
      .lnk_f(lnk[LINK_STAGES]),
      .lk_valid, .lk_msg, .lk_ready,
      .out_valid(q_valid), .out_is_lk(q_is_lk), .out_flit(q_flit), .out_msg(q_msg),
      .out_pop(q_pop), .load(bload[b]), .near_full(near_full[b])
    );

    ring_node #(.ID(b)) u_rn (
      .clk, .rst_n,
      .rin(rout[(b + B - 1) % B]), .rout(rout[b]),
      .ctl_push, .ctl_msg, .ctl_ready,
      .lk_valid, .lk_msg, .lk_ready,
      .rsp_valid, .rsp_msg, .rsp_pop,
      .filt_we, .filt_idx, .filt_valid, .filt_tag,
      .mb_clr, .mb_idx, .mb_bits,
      .ev_filtered(ev_filtered[b])
    );

    hash_bank #(.ID(b)) u_bank (
      .clk, .rst_n, .cfg_ws, .cfg_wa,
      .q_valid, .q_is_lk, .q_flit, .q_msg, .q_pop,
      .ctl_push, .ctl_msg, .ctl_ready,
      .rsp_valid, .rsp_msg, .rsp_pop,
      .filt_we, .filt_idx, .filt_valid, .filt_tag,
      .mb_clr, .mb_idx, .mb_bits,
      .wr_valid(b_wr_valid[b]), .wr_req(b_wr_req[b]), .wr_ready(b_wr_ready[b]),
      .agg_valid(b_agg_valid[b]), .agg_req(b_agg_req[b]), .agg_ready(b_agg_ready[b]),
      .coll_valid(coll_valid[b]), .coll_key(coll_key[b]),
      .ev_hit(ev_bank_hit[b]), .ev_insert(ev_bank_insert[b]),
      .ev_lookup_pos(ev_bank_pos[b]), .ev_stall(ev_bank_stall[b]),
      .ev_flush(ev_bank_flush[b])
    );
  end

  // -------------------------------------------------------- DRAM writes
  logic          wg_valid;
  logic [BB-1:0] wg_idx;
  rr_arb #(.NREQ(B)) u_warb (
    .clk, .rst_n, .req(b_wr_valid), .take(wr_ready),
    .gnt_valid(wg_valid), .gnt_idx(wg_idx)
  );
  assign wr_valid = wg_valid;
  assign wr_req   = b_wr_req[wg_idx];
  always_comb begin
    b_wr_ready = '0;
    b_wr_ready[wg_idx] = wg_valid && wr_ready;
  end

  // ------------------------------------------------- aggregation dispatch
  logic [NCOMP-1:0] c_ready;
  logic             ag_valid, ag_take;
  logic [BB-1:0]    ag_idx;
  logic [$clog2(NCOMP)-1:0] c_sel;
  always_comb begin
    c_sel = '0;
    for (int c = NCOMP - 1; c >= 0; c--) if (c_ready[c]) c_sel = $clog2(NCOMP)'(c);
  end
  assign ag_take = ag_valid && (|c_ready);
  rr_arb #(.NREQ(B)) u_aarb (
    .clk, .rst_n, .req(b_agg_valid), .take(ag_take),
    .gnt_valid(ag_valid), .gnt_idx(ag_idx)
  );
  always_comb begin
    b_agg_ready = '0;
    b_agg_ready[ag_idx] = ag_take;
  end

  for (genvar c = 0; c < NCOMP; c++) begin : g_comp
    compute_q1 u_c (
      .clk, .rst_n,
      .req_valid(ag_take && c_sel == c), .req(b_agg_req[ag_idx]), .req_ready(c_ready[c]),
      .rd_valid(rd_valid[c]), .rd_region(rd_region[c]), .rd_off(rd_off[c]),
      .rd_ready(rd_ready[c]), .rd_data_valid(rd_data_valid[c]), .rd_data(rd_data[c]),
      .res_valid(res_valid[c]), .res_key(res_key[c]), .res_avg(res_avg[c]),
      .res_min(res_min[c]), .res_max(res_max[c]), .res_ready(res_ready[c])
    );
  end

endmodule
