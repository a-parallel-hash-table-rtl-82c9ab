// hbm_model: behavioural model of the off-chip DRAM that holds the sliding
// windows, for simulation only.
//
// Memory is a sparse array of values addressed by (region, offset): region
// is a hash address, offset wraps modulo WS_MAX inside the region's circular
// window. One write port accepts a write every cycle in which `stall_wr` is
// low (the write takes effect immediately). NRD read ports accept a request
// per cycle and return FLUSH_V values, starting at the offset and wrapping
// inside the region, LAT cycles later, in request order.
module hbm_model
  import mht_pkg::*;
#(
  parameter int unsigned NRD = 1,
  parameter int unsigned LAT = 8
) (
  input  logic                                   clk,
  input  logic                                   stall_wr,
  input  logic                                   wr_valid,
  input  dram_wr_t                               wr_req,
  output logic                                   wr_ready,
  input  logic [NRD-1:0]                         rd_valid,
  input  addr_t [NRD-1:0]                        rd_region,
  input  logic [NRD-1:0][OFF_W-1:0]              rd_off,
  output logic [NRD-1:0]                         rd_ready,
  output logic [NRD-1:0]                         rd_data_valid,
  output logic [NRD-1:0][FLUSH_V-1:0][VAL_W-1:0] rd_data
);
  byte unsigned mem [int unsigned];
  int unsigned  writes;
  int unsigned  values_written;

  function automatic int unsigned loc(addr_t r, int unsigned off);
    return int'(r) * WS_MAX + (off % WS_MAX);
  endfunction

  function automatic val_t peek(addr_t r, int unsigned off);
    int unsigned a;
    a = loc(r, off);
    return mem.exists(a) ? val_t'(mem[a]) : '0;
  endfunction

  assign wr_ready = !stall_wr;
  assign rd_ready = '1;

  initial begin
    writes = 0;
    values_written = 0;
  end

  always @(posedge clk)
    if (wr_valid && wr_ready) begin
      for (int k = 0; k < int'(wr_req.len); k++)
        mem[loc(wr_req.region, int'(wr_req.off) + k)] = wr_req.data[k];
      writes++;
      values_written += int'(wr_req.len);
    end

  // Read pipelines.
  for (genvar p = 0; p < NRD; p++) begin : g_rd
    logic [FLUSH_V-1:0][VAL_W-1:0] pipe_d [LAT];
    logic                          pipe_v [LAT];
    initial for (int i = 0; i < LAT; i++) begin
      pipe_v[i] = 1'b0;
      pipe_d[i] = '0;
    end
    always @(posedge clk) begin
      for (int i = LAT - 1; i > 0; i--) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
      pipe_v[0] <= rd_valid[p];
      for (int k = 0; k < FLUSH_V; k++)
        pipe_d[0][k] <= peek(rd_region[p], int'(rd_off[p]) + k);
    end
    assign rd_data_valid[p] = pipe_v[LAT-1];
    assign rd_data[p]       = pipe_d[LAT-1];
  end

endmodule
