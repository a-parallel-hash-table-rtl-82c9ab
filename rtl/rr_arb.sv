// rr_arb: round-robin arbiter. Grants the first requester at or after the
// pointer; the pointer moves past the granted requester when the grant is
// used (take). Combinational grant, registered pointer.
module rr_arb #(
  parameter int unsigned NREQ = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NREQ-1:0]           req,
  input  logic                      take,
  output logic                      gnt_valid,
  output logic [$clog2(NREQ)-1:0]   gnt_idx
);
  localparam int unsigned W = $clog2(NREQ);
  logic [W-1:0] ptr;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int k = NREQ - 1; k >= 0; k--) begin
      int unsigned i;
      i = (int'(ptr) + k) % NREQ;
      if (req[i]) begin
        gnt_valid = 1'b1;
        gnt_idx   = W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ptr <= '0;
    else if (take && gnt_valid) ptr <= W'((int'(gnt_idx) + 1) % NREQ);

endmodule
