// tb_map_ctrl: self-checking test of the mapping controller.
// A reference model keeps its own per-bit saturating counters from the same
// address stream. Phases: addresses whose mapping-1 bank bits are constant
// (skewed) and mapping-2 bits random, then a bank overload: the controller
// must switch to mapping 2 (lowest score), one cycle after the overload, and
// not switch again for HOLD cycles; the second switch, from mapping 2, must
// avoid the skewed mapping 1 and return to 0. Then, with mapping 2 skewed,
// one more overload moves it from 0 to mapping 1. Throughout, the bank
// priority levels must follow the load thresholds one cycle later, and
// every switch must pick the mapping the reference scores lowest.
module tb_map_ctrl;
  import mht_pkg::*;

  localparam int CW = 8, HOLD = 64, SW_TH = 40;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] addr_valid = '0;
  addr_t [N-1:0] addr = '0;
  logic [B-1:0][9:0] load = '0;
  map_t cur_map;
  lvl_t [B-1:0] bank_lvl;
  logic switched;

  map_ctrl dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int ctr [A_W];
  int n_sw = 0, last_sw = -1000, cyc = 0;
  logic [B-1:0][9:0] load_d = '0;
  map_t map_d = '0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial for (int i = 0; i < A_W; i++) ctr[i] = 0;

  function automatic int best_map(map_t cm);
    int bs, b;
    bs = 1 << 30;
    b = int'(cm);
    for (int j = 0; j < M; j++) begin
      int sc;
      sc = 0;
      for (int i = 0; i < BB; i++) sc += (ctr[BB*j+i] < 0) ? -ctr[BB*j+i] : ctr[BB*j+i];
      if (j != int'(cm) && sc < bs) begin
        bs = sc;
        b = j;
      end
    end
    return b;
  endfunction

  // reference model and checks, at each edge
  always @(posedge clk) if (rst_n) begin
    logic over;
    cyc++;
    over = 0;
    for (int b = 0; b < B; b++) if (int'(load[b]) > SW_TH) over = 1;
    checks++;
    if (switched != (over && cyc - last_sw > HOLD)) begin
      failures++;
      $display("cycle %0d: switched=%0d, expected %0d", cyc, switched, !switched);
    end
    if (switched) begin
      checks++;
      if (int'(dut.best) != best_map(cur_map)) failures++;
      last_sw = cyc;
      n_sw++;
      for (int i = 0; i < A_W; i++) ctr[i] = 0;
    end else
      for (int i = 0; i < A_W; i++) begin
        for (int k = 0; k < N; k++) if (addr_valid[k]) ctr[i] += addr[k][i] ? -1 : 1;
        if (ctr[i] > 127) ctr[i] = 127;
        if (ctr[i] < -128) ctr[i] = -128;
      end
    // levels follow the load of the previous cycle
    for (int b = 0; b < B; b++) begin
      int l;
      l = int'(load_d[b]);
      checks++;
      if (int'(bank_lvl[b]) != ((l >= 12) ? 2 : (l >= 4) ? 1 : 0)) failures++;
    end
    load_d <= load;
  end

  task automatic run(int cycles, int skew_map, int ov_from);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        addr_valid[k] = ($urandom % 4) != 0;
        addr[k] = addr_t'($urandom);
        addr[k][BB*skew_map +: BB] = BB'(3);     // skewed: one bank only
      end
      for (int b = 0; b < B; b++) load[b] = 10'($urandom % 16);
      if (c >= ov_from) load[7] = 10'(SW_TH + 1);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(300, 1, 1000);
    checks++;
    if (cur_map != 0 || n_sw != 0) failures++;
    run(200, 1, 100);    // overload from cycle 100 on: switch, then every HOLD
    checks++;
    if (n_sw != 2 || cur_map != 0) failures++;
    $display("after phase 1: map %0d, %0d switches", cur_map, n_sw);
    @(negedge clk);
    load = '0;
    // second phase: mapping 2 skewed, a single overload pulse after HOLD
    run(300, 2, 1000);
    run(1, 2, 0);
    @(negedge clk);
    load = '0;
    @(negedge clk);
    checks++;
    if (cur_map != 1) begin
      failures++;
      $display("expected mapping 1, got %0d", cur_map);
    end
    $display("switches %0d", n_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
