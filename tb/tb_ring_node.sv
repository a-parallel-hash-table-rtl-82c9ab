// tb_ring_node: self-checking test of one inter-bank ring stop (node 2).
// Directed cases: a lookup that passes the filter goes to the bank queue; a
// lookup that fails it is answered by a NEG reply built by the node (and
// counted as filtered); a NEG reply for a held key sets the miss-table bit
// of the mapping that was checked; a POS reply goes to the controller FIFO;
// a reply for an entry that no longer holds the key is dropped; a lookup
// waits on the ring (keeps circulating) while the queue is full; messages
// for other banks pass with one cycle of delay. Then a random phase of
// passing traffic and injections checks that passing messages always have
// priority and that every injected message leaves exactly once, in order.
module tb_ring_node;
  import mht_pkg::*;

  localparam int ME = 2;
  logic clk = 0, rst_n = 0;
  ring_msg_t rin = '0, rout, ctl_msg = '0, lk_msg, rsp_msg;
  logic ctl_push = 0, ctl_ready, lk_valid, lk_ready = 1, rsp_valid, rsp_pop = 0;
  logic filt_we = 0, filt_valid = 0, mb_clr = 0;
  idx_t filt_idx = '0, mb_idx = '0;
  logic [TAG_W-1:0] filt_tag = '0;
  logic [M-1:0] mb_bits;
  logic ev_filtered;

  ring_node #(.ID(ME)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic ring_msg_t msg(msg_e k, int dst, int di, int src, int si, int mp, int key);
    ring_msg_t r;
    r = '0;
    r.valid = 1;
    r.kind = k;
    r.dst = bank_t'(dst);
    r.dst_idx = idx_t'(di);
    r.src = bank_t'(src);
    r.src_idx = idx_t'(si);
    r.map = map_t'(mp);
    r.key = key_t'(key);
    r.tail = 10'd77;
    return r;
  endfunction

  // drive rin for one cycle; sample the combinational outputs before the edge
  logic s_lk, s_filt;
  task automatic drive(ring_msg_t r);
    @(negedge clk);
    rin = r;
    #1;
    s_lk = lk_valid;
    s_filt = ev_filtered;
    @(posedge clk);
    #1;
    rin = '0;
  endtask

  localparam int KEY = 24'h00AB12;

  // random phase bookkeeping
  ring_msg_t pass_q [$];
  ring_msg_t inj_q [$];
  int n_pass = 0, n_inj = 0;

  initial begin
    ring_msg_t r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // entry 5 holds KEY
    @(negedge clk);
    filt_we = 1; filt_idx = 5; filt_valid = 1; filt_tag = KEY[7:0];
    mb_clr = 1; mb_idx = 5;
    @(negedge clk);
    filt_we = 0; mb_clr = 0;

    // lookup passing the filter -> bank queue, not forwarded
    r = msg(MSG_LOOKUP, ME, 5, 9, 40, 1, KEY);
    drive(r);
    chk(s_lk && !s_filt, "lookup to queue");
    chk(!rout.valid, "lookup ejected");

    // lookup for an empty entry -> filtered, NEG back to bank 9 entry 40
    r = msg(MSG_LOOKUP, ME, 6, 9, 40, 2, KEY);
    drive(r);
    chk(!s_lk && s_filt, "lookup filtered");
    chk(!rout.valid, "filtered lookup ejected");
    @(posedge clk); #1;
    chk(rout.valid && rout.kind == MSG_NEG && rout.dst == 9 && rout.dst_idx == 40 &&
        rout.src == ME && rout.src_idx == 6 && rout.map == 2 && rout.key == KEY, "NEG reply injected");

    // lookup with the wrong tag -> filtered too
    r = msg(MSG_LOOKUP, ME, 5, 9, 40, 1, KEY + 1);
    drive(r);
    chk(s_filt, "tag mismatch filtered");
    @(posedge clk); #1;

    // NEG for held key, mapping 1 -> miss bit 1
    r = msg(MSG_NEG, ME, 5, 11, 3, 1, KEY);
    drive(r);
    chk(!rout.valid, "NEG ejected");
    @(negedge clk); mb_idx = 5; #1;
    chk(mb_bits == 3'b010, "miss bit set");
    // NEG for mapping 0 too
    drive(msg(MSG_NEG, ME, 5, 11, 3, 0, KEY));
    @(negedge clk); #1;
    chk(mb_bits == 3'b011, "second miss bit set");

    // POS for held key -> controller FIFO
    r = msg(MSG_POS, ME, 5, 11, 3, 2, KEY);
    drive(r);
    chk(rsp_valid && rsp_msg.tail == 77 && rsp_msg.src == 11, "POS to controller");
    @(negedge clk); rsp_pop = 1;
    @(negedge clk); rsp_pop = 0; #1;
    chk(!rsp_valid, "POS popped");

    // POS for an entry that does not hold the key -> dropped
    drive(msg(MSG_POS, ME, 7, 11, 3, 2, KEY));
    chk(!rout.valid && !rsp_valid, "stale POS dropped");

    // queue full: lookup keeps circulating
    lk_ready = 0;
    r = msg(MSG_LOOKUP, ME, 5, 9, 40, 1, KEY);
    drive(r);
    chk(!s_lk && rout == r, "lookup passes on when queue full");
    lk_ready = 1;

    // message for another bank passes unchanged
    r = msg(MSG_LOOKUP, 20, 5, 9, 40, 1, KEY);
    drive(r);
    chk(rout == r, "foreign message forwarded");
    @(posedge clk); #1;

    // random phase: passing traffic plus injections
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      rin = '0;
      if (($urandom % 3) != 0) begin
        rin = msg(msg_e'($urandom % 3), (ME + 1 + $urandom % (B - 1)) % B, $urandom % S, 0, 0, 0, c);
        pass_q.push_back(rin);
      end
      ctl_push = 0;
      if (ctl_ready && ($urandom % 3) == 0) begin
        ctl_push = 1;
        ctl_msg = msg(MSG_POS, (ME + 3) % B, c % S, ME, 1, 0, 24'h800000 | c);
        inj_q.push_back(ctl_msg);
      end
      @(posedge clk);
      #1;
      // what left: a passing message (priority) or an injection
      if (rout.valid) begin
        if (pass_q.size() != 0 && rout == pass_q[0]) begin
          void'(pass_q.pop_front());
          n_pass++;
        end else if (inj_q.size() != 0 && rout == inj_q[0]) begin
          chk(pass_q.size() == 0, "injection only into a free slot");
          void'(inj_q.pop_front());
          n_inj++;
        end else chk(0, "unexpected message on the ring");
      end
      chk(pass_q.size() == 0, "passing message delayed");
      ctl_push = 0;
    end
    @(negedge clk);
    ctl_push = 0;
    rin = '0;
    repeat (12) begin
      @(posedge clk); #1;
      if (rout.valid && inj_q.size() != 0 && rout == inj_q[0]) begin
        void'(inj_q.pop_front());
        n_inj++;
      end
    end
    chk(inj_q.size() == 0 && n_inj > 100 && n_pass > 1000, "all traffic delivered");
    $display("passed %0d injected %0d", n_pass, n_inj);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
