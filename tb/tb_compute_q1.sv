// tb_compute_q1: self-checking test of the query-1 compute module with the
// DRAM model. Four window regions are filled with random values through the
// DRAM write port (a copy is kept here); then aggregation requests with
// random window sizes (1..WS_MAX, including 64 and 1024) and random tails,
// so windows wrap round the region end, are sent with a random result
// back-pressure. Each result must give the key, the truncated average, the
// minimum and the maximum of exactly the ws values before tail. The time
// from request to result must be ceil(ws/64) read beats plus the DRAM
// latency plus at most 3 cycles.
module tb_compute_q1;
  import mht_pkg::*;

  localparam int LAT = 8;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  agg_req_t req = '0;
  logic rd_valid, rd_ready, rd_data_valid;
  addr_t rd_region;
  logic [OFF_W-1:0] rd_off;
  logic [FLUSH_V-1:0][VAL_W-1:0] rd_data;
  logic res_valid, res_ready = 0;
  key_t res_key;
  val_t res_avg, res_min, res_max;

  logic wr_valid = 0, wr_ready;
  dram_wr_t wr_req = '0;

  compute_q1 dut (.*);

  hbm_model #(.NRD(1), .LAT(LAT)) u_mem (
    .clk, .stall_wr(1'b0), .wr_valid, .wr_req, .wr_ready,
    .rd_valid(rd_valid), .rd_region(rd_region), .rd_off(rd_off), .rd_ready(rd_ready),
    .rd_data_valid(rd_data_valid), .rd_data(rd_data)
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  byte unsigned win [4][WS_MAX];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill the regions
    for (int rg = 0; rg < 4; rg++)
      for (int o = 0; o < WS_MAX; o += FLUSH_V) begin
        @(negedge clk);
        wr_valid = 1;
        wr_req.region = addr_t'(rg * 1000 + 7);
        wr_req.off = OFF_W'(o);
        wr_req.len = FLUSH_V;
        for (int k = 0; k < FLUSH_V; k++) begin
          win[rg][o+k] = byte'($urandom);
          wr_req.data[k] = win[rg][o+k];
        end
      end
    @(negedge clk);
    wr_valid = 0;

    for (int t = 0; t < 200; t++) begin
      int rg, ws, tail, sum, mn, mx, t0, lim;
      rg = $urandom % 4;
      ws = (t == 0) ? WS_MAX : (t == 1) ? 64 : (t == 2) ? 1 : 1 + $urandom % WS_MAX;
      tail = $urandom % WS_MAX;
      sum = 0; mn = 255; mx = 0;
      for (int i = 0; i < ws; i++) begin
        int v;
        v = win[rg][(tail - ws + i + WS_MAX) % WS_MAX];
        sum += v;
        if (v < mn) mn = v;
        if (v > mx) mx = v;
      end
      @(negedge clk);
      while (!req_ready) @(negedge clk);
      req_valid = 1;
      req.key = key_t'(t + 100);
      req.region = addr_t'(rg * 1000 + 7);
      req.tail = OFF_W'(tail);
      req.ws = WS_W'(ws);
      t0 = $time / 10;
      @(negedge clk);
      req_valid = 0;
      while (!res_valid) @(negedge clk);
      lim = (ws + FLUSH_V - 1) / FLUSH_V + LAT + 3;
      checks += 5;
      if (int'($time / 10) - t0 > lim) begin
        failures++;
        $display("ws %0d: result after %0d cycles, limit %0d", ws, $time / 10 - t0, lim);
      end
      if (int'(res_key) != t + 100) failures++;
      if (int'(res_avg) != sum / ws) begin
        failures++;
        $display("ws %0d: avg %0d, want %0d", ws, res_avg, sum / ws);
      end
      if (int'(res_min) != mn) failures++;
      if (int'(res_max) != mx) failures++;
      repeat ($urandom % 3) @(negedge clk);
      res_ready = 1;
      @(negedge clk);
      res_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
