// compute_q1: one compute module for the first query: average, minimum and
// maximum of the last ws values of a key's sliding window.
//
// An aggregation request names the key's DRAM window region, the offset
// just past the newest value (tail) and the window size. The module reads
// the window in ceil(ws/64) beats of 64 values, starting at tail - ws
// (modulo the region size), issuing one read per cycle, and folds each
// returned beat into running sum, min and max with 64 lanes working in
// parallel. When the last beat is in, the result (key, sum/ws, min, max) is
// presented until taken. The DRAM returns beats in request order.
//
// Interface: req_valid/req_ready take an agg_req_t. rd_* is the read port
// (region, offset; 64 values come back on rd_data when rd_data_valid).
// res_* holds the result; res_ready takes it.
// Following the document: window read from DRAM, 64 values processed per
// cycle, the three functions computed incrementally. This design's choices:
// integer average (truncated), a busy module handles one window at a time.
module compute_q1
  import mht_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           req_valid,
  input  agg_req_t                       req,
  output logic                           req_ready,
  output logic                           rd_valid,
  output addr_t                          rd_region,
  output logic [OFF_W-1:0]               rd_off,
  input  logic                           rd_ready,
  input  logic                           rd_data_valid,
  input  logic [FLUSH_V-1:0][VAL_W-1:0]  rd_data,
  output logic                           res_valid,
  output key_t                           res_key,
  output val_t                           res_avg,
  output val_t                           res_min,
  output val_t                           res_max,
  input  logic                           res_ready
);
  localparam int unsigned SUM_W = VAL_W + WS_W;
  localparam int unsigned BW    = WS_W - $clog2(FLUSH_V) + 1;

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DIV, C_OUT} cst_e;
  cst_e st;

  agg_req_t          r;
  logic [OFF_W-1:0]  start;
  logic [BW-1:0]     nbeats, issued, got;
  logic [SUM_W-1:0]  sum;
  val_t              mn, mx;

  assign req_ready = st == C_IDLE;
  assign rd_valid  = st == C_RUN && issued < nbeats;
  assign rd_region = r.region;
  assign rd_off    = start + OFF_W'(int'(issued) * FLUSH_V);
  assign res_valid = st == C_OUT;
  assign res_key   = r.key;
  assign res_min   = mn;
  assign res_max   = mx;

  // Fold one beat: values at window position got*64 + k < ws count.
  logic [SUM_W-1:0] bsum;
  val_t             bmn, bmx;
  always_comb begin
    bsum = '0;
    bmn  = '1;
    bmx  = '0;
    for (int k = 0; k < FLUSH_V; k++) begin
      if (int'(got) * FLUSH_V + k < int'(r.ws)) begin
        bsum += SUM_W'(rd_data[k]);
        if (rd_data[k] < bmn) bmn = rd_data[k];
        if (rd_data[k] > bmx) bmx = rd_data[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st      <= C_IDLE;
      r       <= '0;
      start   <= '0;
      nbeats  <= '0;
      issued  <= '0;
      got     <= '0;
      sum     <= '0;
      mn      <= '1;
      mx      <= '0;
      res_avg <= '0;
    end else begin
      unique case (st)
        C_IDLE: if (req_valid) begin
          r      <= req;
          start  <= req.tail - OFF_W'(req.ws);
          nbeats <= BW'((int'(req.ws) + FLUSH_V - 1) / FLUSH_V);
          issued <= '0;
          got    <= '0;
          sum    <= '0;
          mn     <= '1;
          mx     <= '0;
          st     <= C_RUN;
        end
        C_RUN: begin
          if (rd_valid && rd_ready) issued <= issued + 1'b1;
          if (rd_data_valid) begin
            sum <= sum + bsum;
            if (bmn < mn) mn <= bmn;
            if (bmx > mx) mx <= bmx;
            got <= got + 1'b1;
            if (got + 1'b1 == nbeats) st <= C_DIV;
          end
        end
        C_DIV: begin
          res_avg <= (r.ws == 0) ? '0 : VAL_W'(sum / SUM_W'(r.ws));
          st      <= C_OUT;
        end
        C_OUT: if (res_ready) st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end

endmodule
