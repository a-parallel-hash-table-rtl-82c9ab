// bank_queue: the parallel-in, serial-out request queue in front of one hash
// table bank.
//
// The link to the banks has N lanes; a flit addressed to this bank can
// arrive on any of them, and several can arrive in the same cycle. The
// queue is N lane FIFOs, one per link lane, plus one FIFO for lookup
// requests that arrive over the inter-bank ring (they join the tail of the
// queue so they are ordered after requests already in flight). An order
// FIFO records, for every packet head or lookup, which FIFO it is in, in
// arrival order (lower lane first within a cycle). The output serves the
// oldest packet and stays on its FIFO until the packet's last flit, so a
// packet is never interleaved with another.
//
// Interface: lnk_f are the link lanes (taken when valid and bank == BANK);
// lk_* is a lookup from the ring node (lk_ready: room in the lookup FIFO).
// The output is valid with either a flit (out_is_lk = 0) or a lookup; it is
// removed when out_pop is high. load is the number of flits and lookups
// held; near_full is high when some lane FIFO has fewer than MARGIN free
// slots, which the system uses to stop sending on the link.
// The document fixes the structure (N parallel queues multiplexed to one
// output with order tracking); depths and margin are this design's.
module bank_queue
  import mht_pkg::*;
#(
  parameter int unsigned QD     = 16,
  parameter int unsigned MARGIN = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bank_t              bank_id,
  input  flit_t [N-1:0]      lnk_f,
  input  logic               lk_valid,
  input  ring_msg_t          lk_msg,
  output logic               lk_ready,
  output logic               out_valid,
  output logic               out_is_lk,
  output flit_t              out_flit,
  output ring_msg_t          out_msg,
  input  logic               out_pop,
  output logic [9:0]         load,
  output logic               near_full
);
  localparam int unsigned QW  = $clog2(QD);
  localparam int unsigned OD  = (N + 1) * QD;
  localparam int unsigned OW  = $clog2(OD);
  localparam int unsigned LW  = $clog2(N + 1);

  flit_t     [QD-1:0] ff [N];
  ring_msg_t [QD-1:0] lkf;
  logic [QW-1:0] wp [N+1];
  logic [QW-1:0] rp [N+1];
  logic [QW:0]   cnt [N+1];

  logic [LW-1:0] ord [OD];
  logic [OW-1:0] owp, orp;
  logic [OW:0]   ocnt;

  logic [N:0] push;
  always_comb begin
    for (int l = 0; l < N; l++) push[l] = lnk_f[l].valid && lnk_f[l].bank == bank_id;
    push[N] = lk_valid && lk_ready;
  end
  assign lk_ready = int'(cnt[N]) < QD;

  // New order entries this cycle: packet heads and lookups.
  logic [N:0] newp;
  always_comb
    for (int l = 0; l <= N; l++)
      newp[l] = push[l] && (l == N || lnk_f[l % N].head);

  // Output side.
  logic [LW-1:0] cur;
  assign cur       = ord[orp];
  assign out_valid = ocnt != 0 && cnt[cur] != 0;
  assign out_is_lk = int'(cur) == N;
  assign out_flit  = out_is_lk ? '0 : ff[int'(cur) % N][rp[cur]];
  assign out_msg   = out_is_lk ? lkf[rp[N]] : '0;

  logic pop_pkt;
  assign pop_pkt = out_pop && out_valid && (out_is_lk || out_flit.last);

  always_comb begin
    int unsigned t;
    t = 0;
    near_full = 1'b0;
    for (int l = 0; l <= N; l++) t += int'(cnt[l]);
    for (int l = 0; l < N; l++) if (int'(cnt[l]) + MARGIN > QD) near_full = 1'b1;
    load = 10'(t);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int l = 0; l <= N; l++) begin
        wp[l]  <= '0;
        rp[l]  <= '0;
        cnt[l] <= '0;
      end
      owp  <= '0;
      orp  <= '0;
      ocnt <= '0;
    end else begin
      int unsigned k;
      k = 0;
      for (int l = 0; l <= N; l++) begin
        logic rd;
        rd = out_pop && out_valid && int'(cur) == l;
        if (push[l]) begin
          if (l < N) ff[l][wp[l]] <= lnk_f[l];
          else       lkf[wp[l]]   <= lk_msg;
          wp[l] <= wp[l] + 1'b1;
        end
        if (rd) rp[l] <= rp[l] + 1'b1;
        cnt[l] <= cnt[l] + (QW+1)'(push[l]) - (QW+1)'(rd);
        if (newp[l]) begin
          ord[OW'((int'(owp) + k) % OD)] <= LW'(l);
          k++;
        end
      end
      owp  <= OW'((int'(owp) + k) % OD);
      orp  <= pop_pkt ? OW'((int'(orp) + 1) % OD) : orp;
      ocnt <= ocnt + (OW+1)'(k) - (OW+1)'(pop_pkt);
    end

  // A flit is never pushed into a full lane FIFO: the link stops early.
  always @(posedge clk)
    if (rst_n)
      for (int l = 0; l < N; l++)
        assert (!(push[l] && int'(cnt[l]) >= QD))
          else $error("bank_queue lane %0d overflow", l);

endmodule
