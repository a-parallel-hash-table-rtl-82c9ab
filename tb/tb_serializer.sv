// tb_serializer: self-checking test of the packet serializer.
// Offers random batches of multi-value tuples (1..N values, random empty
// lanes) whenever the serializer is ready, with random `send` stalls and a
// mapping that changes now and then. A decoder per lane rebuilds every
// packet from its flits and checks: each tuple comes out exactly once with
// its values in order; the packet has 1 flit for one value, else
// 1 + ceil(k/4); every flit of a packet carries the bank the key maps to
// under the mapping current when the head flit left; a lane with queued
// packets sends one flit in every cycle that `send` is high; the k-th tuple
// of a batch goes to the lane of k-th lowest occupancy.
module tb_serializer;
  import mht_pkg::*;

  logic clk = 0, rst_n = 0, take = 0, send = 0, ready;
  map_t cur_map = '0;
  mtuple_t [N-1:0] in_t = '0;
  flit_t [N-1:0] out_f;
  logic [N-1:0][3:0] occ;

  serializer dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mtuple_t expq [key_t];     // tuples sent, not yet seen
  int sent = 0, got = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-lane decoder state
  key_t  d_key [N];
  int    d_cnt [N], d_got [N], d_fl [N];
  bank_t d_bank [N];
  val_t  d_vals [N][N];
  logic  d_busy [N];
  initial for (int l = 0; l < N; l++) d_busy[l] = 0;

  task automatic finish_packet(int l);
    checks++;
    if (!expq.exists(d_key[l])) begin
      failures++;
      $display("lane %0d: unknown or repeated key %h", l, d_key[l]);
      return;
    end
    begin
      mtuple_t t;
      int nf;
      t = expq[d_key[l]];
      nf = (int'(t.cnt) == 1) ? 1 : 1 + (int'(t.cnt) + 3) / 4;
      checks += 2;
      if (d_cnt[l] != int'(t.cnt)) failures++;
      if (d_fl[l] != nf) begin
        failures++;
        $display("key %h: %0d flits, want %0d", d_key[l], d_fl[l], nf);
      end
      for (int q = 0; q < int'(t.cnt); q++) begin
        checks++;
        if (d_vals[l][q] != t.vals[q]) failures++;
      end
      expq.delete(d_key[l]);
      got++;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < N; l++) begin
      // a lane with packets sends while send is high
      checks++;
      if (send && occ[l] != 0 && !out_f[l].valid) failures++;
      if (!send && out_f[l].valid) failures++;
      if (out_f[l].valid) begin
        if (out_f[l].head) begin
          checks += 2;
          if (d_busy[l]) failures++;
          d_key[l] = out_f[l].data[31:8];
          if (out_f[l].bank != map_bank(hash_key(d_key[l]), cur_map) || out_f[l].map != cur_map) begin
            failures++;
            $display("lane %0d: head bank %0d, want %0d", l, out_f[l].bank, map_bank(hash_key(d_key[l]), cur_map));
          end
          d_bank[l] = out_f[l].bank;
          d_fl[l] = 1;
          if (out_f[l].last) begin
            d_cnt[l] = 1;
            d_vals[l][0] = out_f[l].data[7:0];
            finish_packet(l);
          end else begin
            d_cnt[l] = int'(out_f[l].data[7:0]);
            d_got[l] = 0;
            d_busy[l] = 1;
          end
        end else begin
          checks += 2;
          if (!d_busy[l]) failures++;
          if (out_f[l].bank != d_bank[l]) failures++;
          d_fl[l]++;
          for (int q = 0; q < 4; q++)
            if (d_got[l] < d_cnt[l] && d_got[l] < N) begin
              d_vals[l][d_got[l]] = out_f[l].data[8*q +: 8];
              d_got[l]++;
            end
          if (out_f[l].last) begin
            d_busy[l] = 0;
            finish_packet(l);
          end
        end
      end
    end
  end

  // placement check: at the taking edge, the k-th valid tuple must be
  // written to the lane of k-th lowest occupancy
  always @(posedge clk) if (rst_n && take) begin
    int k;
    k = 0;
    for (int i = 0; i < N; i++)
      if (in_t[i].valid) begin
        int r, lane;
        lane = -1;
        for (int l = 0; l < N; l++) begin
          r = 0;
          for (int o = 0; o < N; o++)
            if (occ[o] < occ[l] || (occ[o] == occ[l] && o < l)) r++;
          if (r == k) lane = l;
        end
        checks++;
        if (lane < 0 || dut.wr_t[lane].key != in_t[i].key || !dut.wr_en[lane]) failures++;
        k++;
      end
  end

  initial begin
    int id;
    id = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      send = ($urandom % 5) != 0;
      if (c % 300 == 299) cur_map = map_t'(($urandom % M));
      in_t = '0;
      take = 0;
      if (c < 3000 && ready && ($urandom % 3) != 0) begin
        take = 1;
        for (int l = 0; l < N; l++)
          if (($urandom % 3) != 0) begin
            int n;
            n = 1 + $urandom % N;
            in_t[l].valid = 1;
            in_t[l].key   = key_t'(id * 977);
            in_t[l].addr  = hash_key(in_t[l].key);
            in_t[l].cnt   = CNT_W'(n);
            for (int q = 0; q < n; q++) in_t[l].vals[q] = val_t'($urandom);
            expq[in_t[l].key] = in_t[l];
            id++;
            sent++;
          end
      end
    end
    @(negedge clk);
    take = 0;
    checks++;
    if (expq.num() != 0 || got != sent) begin
      failures++;
      $display("sent %0d tuples, decoded %0d", sent, got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
