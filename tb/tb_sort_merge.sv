// tb_sort_merge: self-checking test of sort_merge.
// Sends random batches (keys from a small set so that merges happen, random
// empty lanes), then checks every output batch against a reference grouping
// computed here: one valid lane per distinct key, holding all its values in
// input-lane order, at the lane of the first tuple of its group, groups
// contiguous, hash address attached; and the 7-cycle latency.
module tb_sort_merge;
  import mht_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0] in_valid;
  key_t [N-1:0] in_key;
  val_t [N-1:0] in_val;
  mtuple_t [N-1:0] out_t;

  sort_merge dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int LAT = LOG_N * (LOG_N + 1) / 2 + 1;
  localparam int NB = 300;

  logic [N-1:0] bv [NB];
  key_t [N-1:0] bk [NB];
  val_t [N-1:0] bvl [NB];

  task automatic check_batch(int b);
    int seen;
    seen = 0;
    // each distinct key: exactly one valid lane with the right values
    for (int i = 0; i < N; i++) begin
      if (bv[b][i]) begin
        logic first;
        first = 1;
        for (int j = 0; j < i; j++) if (bv[b][j] && bk[b][j] == bk[b][i]) first = 0;
        if (first) begin
          int found, cnt;
          val_t exp [$];
          exp = {};
          for (int j = 0; j < N; j++) if (bv[b][j] && bk[b][j] == bk[b][i]) exp.push_back(bvl[b][j]);
          found = 0;
          for (int o = 0; o < N; o++)
            if (out_t[o].valid && out_t[o].key == bk[b][i]) begin
              found++;
              cnt = int'(out_t[o].cnt);
              checks++;
              if (cnt != exp.size()) failures++;
              for (int q = 0; q < exp.size() && q < N; q++) begin
                checks++;
                if (out_t[o].vals[q] != exp[q]) failures++;
              end
              checks++;
              if (out_t[o].addr != hash_key(bk[b][i])) failures++;
              // group is contiguous: the next cnt-1 lanes are invalid
              for (int q = 1; q < cnt && o + q < N; q++) begin
                checks++;
                if (out_t[o+q].valid) failures++;
              end
            end
          checks++;
          if (found != 1) begin
            failures++;
            $display("batch %0d key %h found %0d times", b, bk[b][i], found);
          end
          seen++;
        end
      end
    end
    // no extra valid lanes
    begin
      int nv;
      nv = 0;
      for (int o = 0; o < N; o++) nv += out_t[o].valid;
      checks++;
      if (nv != seen) failures++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pipe_id [LAT];
  initial for (int i = 0; i < LAT; i++) pipe_id[i] = -1;

  initial begin
    int b;
    in_valid = '0;
    in_key = '0;
    in_val = '0;
    for (int bb = 0; bb < NB; bb++)
      for (int i = 0; i < N; i++) begin
        bv[bb][i]  = ($urandom % 8) != 0;
        bk[bb][i]  = (bb % 3 == 0) ? key_t'($urandom % 3) : key_t'($urandom % 16) << ($urandom % 20);
        bvl[bb][i] = val_t'($urandom);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    b = 0;
    while (b < NB + LAT + 4) begin
      @(negedge clk);
      // check the batch now at the output, then drive the next one
      if (pipe_id[LAT-1] >= 0 && pipe_id[LAT-1] < NB) check_batch(pipe_id[LAT-1]);
      pipe_id[LAT-1] = -1;
      en = ($urandom % 5) != 0;
      if (b < NB) begin
        in_valid = bv[b];
        in_key   = bk[b];
        in_val   = bvl[b];
      end else in_valid = '0;
      @(posedge clk);
      if (en) begin
        for (int i = LAT - 1; i > 0; i--) pipe_id[i] = pipe_id[i-1];
        pipe_id[0] = (b < NB) ? b : -1;
        b++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
