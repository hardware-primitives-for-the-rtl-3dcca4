// Round-robin thread arbiter of a multithreaded elastic channel.
//
// Each cycle it grants at most one of the N requesting threads. A thread
// requests when it holds valid data and its downstream ready is asserted, so a
// grant is always a completed transfer. The search starts at the thread after
// the one granted last, which gives every requesting thread a turn within N
// cycles. Grant is combinational from req (same cycle); the priority pointer
// is the only state and moves on every grant.
// The document asks only for an arbiter that picks the active thread after
// looking at which threads are ready downstream; round-robin is this design's
// choice.
module rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;

  always_comb begin
    logic found;
    logic [IW-1:0] idx;
    grant = '0;
    found = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = IW'((32'(last_q) + k) % N);
      if (!found && req[idx]) begin
        grant[idx] = 1'b1;
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= IW'(N - 1);
    end else begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) last_q <= IW'(i);
    end
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_grant_req:    assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule
