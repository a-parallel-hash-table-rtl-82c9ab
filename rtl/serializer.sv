// serializer: turns the up to N multi-value tuples leaving the waterfall
// cache each cycle into variable-size packets on N lanes of 32-bit flits,
// which keeps the link to the banks narrow.
//
// Packet format (this design's layout of the document's header/value flits):
//   one value  : a single flit, head = last = 1, data = {key, value}
//   k > 1 vals : head flit data = {key, k}, then ceil(k/4) body flits with
//                four values each, oldest value in bits [7:0].
// Every flit also carries its destination bank and the mapping that chose
// it; the bank is the key's hash address under the current mapping, taken
// when the head flit leaves.
//
// Each lane has a packet FIFO of DEPTH tuples. The evictions of a cycle are
// spread over the lanes so that the k-th eviction goes to the lane with the
// k-th lowest occupancy (ties by lane number): less busy lanes first.
//
// Interface: in_t is taken when take is high (all lanes then have room,
// see ready). A lane sends one flit per cycle while send is high.
module serializer
  import mht_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               take,
  input  logic               send,
  input  map_t               cur_map,
  input  mtuple_t [N-1:0]    in_t,
  output logic               ready,      // every lane can take one tuple
  output flit_t [N-1:0]      out_f,
  output logic [N-1:0][$clog2(DEPTH):0] occ
);
  localparam int unsigned PW = $clog2(DEPTH);

  mtuple_t [DEPTH-1:0] fifo [N];
  logic [PW-1:0]  wp [N];
  logic [PW-1:0]  rp [N];
  logic [PW:0]    cnt [N];
  logic [3:0]     fi [N];        // next flit of the head packet
  bank_t          pbank [N];
  map_t           pmap [N];

  always_comb begin
    ready = 1'b1;
    for (int l = 0; l < N; l++) begin
      occ[l] = cnt[l];
      if (int'(cnt[l]) >= DEPTH) ready = 1'b0;
    end
  end

  // Lane for each eviction.
  logic [N-1:0][LOG_N-1:0] rank;    // rank of lane l by occupancy
  logic [N-1:0]            wr_en;
  mtuple_t [N-1:0]         wr_t;
  always_comb begin
    int unsigned k;
    for (int l = 0; l < N; l++) begin
      int unsigned r;
      r = 0;
      for (int o = 0; o < N; o++)
        if (cnt[o] < cnt[l] || (cnt[o] == cnt[l] && o < l)) r++;
      rank[l] = LOG_N'(r);
    end
    wr_en = '0;
    wr_t  = '0;
    k = 0;
    for (int i = 0; i < N; i++) begin
      if (in_t[i].valid) begin
        for (int l = 0; l < N; l++)
          if (int'(rank[l]) == k) begin
            wr_en[l] = take;
            wr_t[l]  = in_t[i];
          end
        k++;
      end
    end
  end

  // Flit generation from the head packet of each lane.
  logic [N-1:0] pop;
  always_comb begin
    mtuple_t t;
    int unsigned nb, c;
    t  = '0;
    nb = 0;
    c  = 0;
    for (int l = 0; l < N; l++) begin
      t  = fifo[l][rp[l]];
      c  = int'(t.cnt);
      nb = (c + 3) / 4;
      out_f[l] = '0;
      pop[l]   = 1'b0;
      if (send && cnt[l] != 0) begin
        out_f[l].valid = 1'b1;
        if (fi[l] == 0) begin
          out_f[l].head = 1'b1;
          out_f[l].bank = map_bank(t.addr, cur_map);
          out_f[l].map  = cur_map;
          out_f[l].last = (c == 1);
          out_f[l].data = {t.key, (c == 1) ? t.vals[0] : VAL_W'(c)};
          pop[l]        = (c == 1);
        end else begin
          out_f[l].bank = pbank[l];
          out_f[l].map  = pmap[l];
          out_f[l].last = (int'(fi[l]) == nb);
          for (int q = 0; q < 4; q++)
            if (4 * (int'(fi[l]) - 1) + q < c)
              out_f[l].data[8*q +: 8] = t.vals[(4 * (int'(fi[l]) - 1) + q) % N];
          pop[l] = (int'(fi[l]) == nb);
        end
      end
    end
  end

  for (genvar l = 0; l < N; l++) begin : g_lane
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        wp[l]    <= '0;
        rp[l]    <= '0;
        cnt[l]   <= '0;
        fi[l]    <= '0;
        pbank[l] <= '0;
        pmap[l]  <= '0;
      end else begin
        if (wr_en[l]) begin
          fifo[l][wp[l]] <= wr_t[l];
          wp[l] <= wp[l] + 1'b1;
        end
        if (out_f[l].valid) begin
          if (out_f[l].head) begin
            pbank[l] <= out_f[l].bank;
            pmap[l]  <= out_f[l].map;
          end
          fi[l] <= pop[l] ? '0 : fi[l] + 1'b1;
        end
        if (pop[l]) rp[l] <= rp[l] + 1'b1;
        cnt[l] <= cnt[l] + (PW+1)'(wr_en[l]) - (PW+1)'(pop[l]);
      end
  end

endmodule
