// ring_node: the stop of one bank on the inter-bank communication ring,
// with the bank's lookup filter and its table of negative lookup replies.
//
// The ring is a chain of one register per bank closed into a loop; a
// message moves one bank per cycle. A node takes a message addressed to it
// off the ring when it can; otherwise the message keeps going round and
// returns later. Passing traffic has priority over injection; the node
// injects its own messages (from a small FIFO) into free slots.
//
// What the node does with a message for its bank:
//   LOOKUP (is this key stored here under that mapping?): checked against
//     the filter, a table with a valid bit and a key tag per bank entry.
//     If the entry cannot hold the key a NEG reply is sent right away
//     without disturbing the bank; otherwise the lookup joins the tail of
//     the bank queue.
//   NEG reply: if the entry still holds the key (filter), the bit of the
//     mapping that was checked is set in the miss table (M bits per entry),
//     which the bank controller reads in parallel with the entry itself.
//   POS reply (the key was found and moved out, with its DRAM pointers):
//     handed to the bank controller through a small FIFO that bypasses the
//     bank queue.
// Messages that fail the destination filter are dropped.
//
// Interface: rin from the previous node, rout registered to the next one.
// ctl_* injects from the bank controller, lk_* feeds the bank queue, rsp_*
// feeds the bank controller. The filter and miss table are written by the
// bank controller through the filt_* and mb_clr_* ports.
// Following the document: ring between banks, lookup filter, m-1 bit miss
// table read in parallel, positive replies bypassing the queue. This
// design's choices: 8-bit key tags in the filter, FIFO depths.
module ring_node
  import mht_pkg::*;
#(
  parameter int unsigned ID    = 0,
  parameter int unsigned IDEPTH = 8,
  parameter int unsigned RDEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ring_msg_t          rin,
  output ring_msg_t          rout,
  // injection from the bank controller
  input  logic               ctl_push,
  input  ring_msg_t          ctl_msg,
  output logic               ctl_ready,
  // lookups towards the bank queue
  output logic               lk_valid,
  output ring_msg_t          lk_msg,
  input  logic               lk_ready,
  // positive replies towards the bank controller
  output logic               rsp_valid,
  output ring_msg_t          rsp_msg,
  input  logic               rsp_pop,
  // filter and miss table
  input  logic               filt_we,
  input  idx_t               filt_idx,
  input  logic               filt_valid,
  input  logic [TAG_W-1:0]   filt_tag,
  input  logic               mb_clr,
  input  idx_t               mb_idx,
  output logic [M-1:0]       mb_bits,
  output logic               ev_filtered
);
  localparam int unsigned IW = $clog2(IDEPTH);
  localparam int unsigned RW = $clog2(RDEPTH);

  logic [S-1:0]            fv;
  logic [TAG_W-1:0]        ftag [S];
  logic [M-1:0]            mbt  [S];

  ring_msg_t inj [IDEPTH];
  logic [IW-1:0] iwp, irp;
  logic [IW:0]   icnt;
  ring_msg_t rsq [RDEPTH];
  logic [RW-1:0] rwp, rrp;
  logic [RW:0]   rcnt;

  logic mine, fhit;
  assign mine = rin.valid && int'(rin.dst) == ID;
  assign fhit = fv[rin.dst_idx] && ftag[rin.dst_idx] == rin.key[TAG_W-1:0];

  int unsigned ifree;
  assign ifree     = IDEPTH - int'(icnt);
  assign ctl_ready = ifree >= 2;

  // Ejection decisions.
  logic take_lk, gen_neg, take_neg, take_pos, drop, eject;
  always_comb begin
    take_lk  = mine && rin.kind == MSG_LOOKUP && fhit && lk_ready;
    gen_neg  = mine && rin.kind == MSG_LOOKUP && !fhit && ifree >= (ctl_push ? 2 : 1);
    take_neg = mine && rin.kind == MSG_NEG && fhit;
    take_pos = mine && rin.kind == MSG_POS && fhit && int'(rcnt) < RDEPTH;
    drop     = mine && rin.kind != MSG_LOOKUP && !fhit;
    eject    = take_lk || gen_neg || take_neg || take_pos || drop;
  end

  assign lk_valid    = take_lk;
  assign lk_msg      = rin;
  assign ev_filtered = gen_neg;
  assign rsp_valid   = rcnt != 0;
  assign rsp_msg     = rsq[rrp];
  assign mb_bits     = mbt[mb_idx];

  ring_msg_t neg;
  always_comb begin
    neg         = rin;
    neg.kind    = MSG_NEG;
    neg.dst     = rin.src;
    neg.dst_idx = rin.src_idx;
    neg.src     = bank_t'(ID);
    neg.src_idx = rin.dst_idx;
  end

  logic inj_go;
  assign inj_go = icnt != 0 && (!rin.valid || eject);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rout <= '0;
      iwp  <= '0;
      irp  <= '0;
      icnt <= '0;
      rwp  <= '0;
      rrp  <= '0;
      rcnt <= '0;
      fv   <= '0;
    end else begin
      int unsigned np;
      // ring slot
      if (rin.valid && !eject) rout <= rin;
      else if (inj_go)         rout <= inj[irp];
      else                     rout <= '0;
      // injection FIFO: controller first, then a filter NEG
      np = 0;
      if (ctl_push) begin
        inj[iwp] <= ctl_msg;
        np++;
      end
      if (gen_neg) begin
        inj[IW'(int'(iwp) + np)] <= neg;
        np++;
      end
      iwp  <= IW'(int'(iwp) + np);
      if (inj_go) irp <= irp + 1'b1;
      icnt <= (IW+1)'(int'(icnt) + np - int'(inj_go));
      // positive replies
      if (take_pos) begin
        rsq[rwp] <= rin;
        rwp <= rwp + 1'b1;
      end
      if (rsp_pop && rsp_valid) rrp <= rrp + 1'b1;
      rcnt <= rcnt + (RW+1)'(take_pos) - (RW+1)'(rsp_pop && rsp_valid);
      // filter
      if (filt_we) begin
        fv[filt_idx]   <= filt_valid;
        ftag[filt_idx] <= filt_tag;
      end
    end

  // Miss table: cleared on insertion, a bit set per negative reply.
  always_ff @(posedge clk) begin
    if (mb_clr) mbt[mb_idx] <= '0;
    if (take_neg) mbt[rin.dst_idx][rin.map] <= 1'b1;
  end

  always @(posedge clk)
    if (rst_n) assert (!(ctl_push && !ctl_ready)) else $error("ring_node %0d: push while not ready", ID);

endmodule
