// tb_bank_queue: self-checking test of the per-bank request queue.
// Every link lane carries a stream of packets (1..3 flits, random gaps even
// inside a packet) to random banks, a quarter of them to the bank under
// test; lookups arrive at random; the bank side pops at random. Lanes stop
// sending while near_full is high, as the link does. A reference model
// orders packets by the cycle their head arrived (lower lane first, lookup
// last within a cycle) and checks that the output gives each packet whole,
// not interleaved, in that order, that nothing is lost, and that `load`
// equals the number of flits and lookups held.
module tb_bank_queue;
  import mht_pkg::*;

  localparam bank_t ME = 5'd3;
  logic clk = 0, rst_n = 0;
  bank_t bank_id = ME;
  flit_t [N-1:0] lnk_f = '0;
  logic lk_valid = 0, lk_ready;
  ring_msg_t lk_msg = '0;
  logic out_valid, out_is_lk, out_pop = 0;
  flit_t out_flit;
  ring_msg_t out_msg;
  logic [9:0] load;
  logic near_full;

  bank_queue dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // reference: queue of packet ids (lookups: id with bit 30 set), and
  // per id the number of flits
  int ref_q [$];
  int nfl [int];
  int held = 0;
  int cur_fi = 0;
  int done = 0, made = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lane sources
  int l_id [N], l_len [N], l_pos [N];
  bank_t l_bank [N];
  int next_id = 1;

  always @(posedge clk) if (rst_n) begin
    // output side first (state before this edge)
    checks++;
    if (int'(load) != held) begin
      failures++;
      $display("load %0d, held %0d", load, held);
    end
    if (out_pop && out_valid) begin
      checks++;
      if (ref_q.size() == 0) failures++;
      else if (out_is_lk) begin
        if (int'(out_msg.key) != ref_q[0]) begin
          failures++;
          $display("lookup %0d out, want %0d", out_msg.key, ref_q[0]);
        end
        void'(ref_q.pop_front());
        done++;
      end else begin
        if (int'(out_flit.data[31:8]) != ref_q[0] || int'(out_flit.data[7:0]) != cur_fi ||
            out_flit.head != (cur_fi == 0) || out_flit.last != (cur_fi == nfl[ref_q[0]] - 1)) begin
          failures++;
          $display("flit %0d.%0d out, want %0d.%0d", out_flit.data[31:8], out_flit.data[7:0], ref_q[0], cur_fi);
        end
        cur_fi++;
        if (out_flit.last) begin
          void'(ref_q.pop_front());
          cur_fi = 0;
          done++;
        end
      end
      held--;
    end
    // input side: packets in lane order, then the lookup
    for (int l = 0; l < N; l++)
      if (lnk_f[l].valid && lnk_f[l].bank == ME) begin
        if (lnk_f[l].head) ref_q.push_back(int'(lnk_f[l].data[31:8]));
        held++;
      end
    if (lk_valid && lk_ready) begin
      ref_q.push_back(int'(lk_msg.key));
      held++;
    end
  end

  initial begin
    for (int l = 0; l < N; l++) l_len[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      out_pop = ($urandom % 3) == 0;
      lnk_f = '0;
      if (c < 5000 && !near_full)
        for (int l = 0; l < N; l++) begin
          if (l_len[l] == 0 && ($urandom % 3) == 0) begin
            l_id[l] = next_id++;
            l_len[l] = 1 + $urandom % 3;
            l_pos[l] = 0;
            l_bank[l] = (($urandom % 4) == 0) ? ME : bank_t'($urandom);
            nfl[l_id[l]] = l_len[l];
            if (l_bank[l] == ME) made++;
          end
          if (l_len[l] != 0 && ($urandom % 4) != 0) begin
            lnk_f[l].valid = 1;
            lnk_f[l].bank  = l_bank[l];
            lnk_f[l].head  = l_pos[l] == 0;
            lnk_f[l].last  = l_pos[l] == l_len[l] - 1;
            lnk_f[l].data  = {24'(l_id[l]), 8'(l_pos[l])};
            l_pos[l]++;
            if (l_pos[l] == l_len[l]) l_len[l] = 0;
          end
        end
      lk_valid = c < 5000 && ($urandom % 8) == 0;
      lk_msg = '0;
      if (lk_valid) begin
        lk_msg.valid = 1;
        lk_msg.kind  = MSG_LOOKUP;
        lk_msg.key   = key_t'(next_id | (1 << 20));
        if (lk_ready) made++;
        next_id++;
      end
    end
    @(negedge clk);
    checks++;
    if (done != made || ref_q.size() != 0) begin
      failures++;
      $display("made %0d packets/lookups, delivered %0d", made, done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
