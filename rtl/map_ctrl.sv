// map_ctrl: chooses which of the M address mappings places new keys, and
// turns bank queue loads into the priority levels used by the cache.
//
// Mapping j selects the bank with hash address bits [BB*j +: BB]. The
// controller keeps one saturating counter per address bit, over the hash
// addresses of the keys entering the cache under the current mapping: +1
// for a 0 bit, -1 for a 1 bit. A counter near zero marks a bit with high
// entropy, good for selecting banks. When any bank queue holds more than
// SW_TH requests (and at least HOLD cycles have passed since the last
// change) the controller switches to the other mapping whose bank bits have
// the smallest sum of absolute counter values, then clears the counters.
//
// Bank priority for the cache: level 0 below LVL1_TH queued requests,
// level 1 below LVL2_TH, level 2 above. Levels are registered, so the cache
// sees them one cycle late.
//
// Interface: addr_valid/addr are the hash addresses entering the cache in
// a cycle; load is each bank queue's occupancy. cur_map and bank_lvl are
// registered outputs; switched pulses on a change.
// Following the document: switch on a queue load threshold, per-bit
// saturating counters, lowest summed score wins, three priority levels.
// This design's choices: counter width, threshold values, the hold time.
module map_ctrl
  import mht_pkg::*;
#(
  parameter int unsigned LVL1_TH = 4,
  parameter int unsigned LVL2_TH = 12,
  parameter int unsigned SW_TH   = 40,
  parameter int unsigned HOLD    = 64,
  parameter int unsigned CW      = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         addr_valid,
  input  addr_t [N-1:0]        addr,
  input  logic [B-1:0][9:0]    load,
  output map_t                 cur_map,
  output lvl_t [B-1:0]         bank_lvl,
  output logic                 switched
);
  logic signed [CW-1:0] ctr [A_W];
  logic [15:0] hold;

  logic over;
  always_comb begin
    over = 1'b0;
    for (int b = 0; b < B; b++) if (int'(load[b]) > SW_TH) over = 1'b1;
  end

  // Best alternative mapping.
  map_t best;
  always_comb begin
    int unsigned bs;
    bs   = '1;
    best = cur_map;
    for (int j = 0; j < M; j++) begin
      int unsigned sc;
      sc = 0;
      for (int i = 0; i < BB; i++) begin
        int c;
        c = int'(ctr[BB*j+i]);
        sc += (c < 0) ? -c : c;
      end
      if (j != int'(cur_map) && sc < bs) begin
        bs   = sc;
        best = map_t'(j);
      end
    end
  end

  assign switched = over && hold == 0 && M > 1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur_map  <= '0;
      hold     <= '0;
      bank_lvl <= '0;
      for (int i = 0; i < A_W; i++) ctr[i] <= '0;
    end else begin
      for (int b = 0; b < B; b++)
        bank_lvl[b] <= (int'(load[b]) >= LVL2_TH) ? 2'd2 : (int'(load[b]) >= LVL1_TH) ? 2'd1 : 2'd0;
      if (switched) begin
        cur_map <= best;
        hold    <= 16'(HOLD);
        for (int i = 0; i < A_W; i++) ctr[i] <= '0;
      end else begin
        if (hold != 0) hold <= hold - 1'b1;
        for (int i = 0; i < A_W; i++) begin
          int d, v;
          d = 0;
          for (int k = 0; k < N; k++)
            if (addr_valid[k]) d += addr[k][i] ? -1 : 1;
          v = int'(ctr[i]) + d;
          if (v > (2 ** (CW - 1)) - 1) v = (2 ** (CW - 1)) - 1;
          if (v < -(2 ** (CW - 1))) v = -(2 ** (CW - 1));
          ctr[i] <= CW'(v);
        end
      end
    end

endmodule
