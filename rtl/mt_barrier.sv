// Multithreaded elastic thread barrier.
//
// Holds every thread that reaches it until N threads have arrived, then lets
// them all continue. Each thread has a data register and a three-state FSM:
//   IDLE: ready upstream. On an arriving item: store it, copy the global go
//         flag into the thread's local copy lgo, pulse the counter enable,
//         move to WAIT.
//   WAIT: stay while lgo == go; when go flips, move to FREE.
//   FREE: offer the item downstream; when the arbiter selects the thread,
//         move back to IDLE.
// A shared counter counts arrivals. When it equals N it is cleared and go is
// inverted in the same clock edge (released = 1 in that cycle), which moves
// every waiting thread to FREE one cycle later. FREE threads leave one per
// cycle through a round-robin arbiter that only considers threads whose
// downstream ready is asserted (vout combinational from rin).
// Structure and state transitions follow the barrier drawing. Choices of
// this design: N defaults to S; an arrival in the cycle the counter is
// cleared is counted for the next phase and takes the new go value; round-
// robin arbitration; reset to IDLE with go = 0.
module mt_barrier
  import mt_pkg::*;
#(
  parameter int unsigned S = 8,
  parameter int unsigned W = 32,
  parameter int unsigned N = S
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [S-1:0] vin,
  output logic [S-1:0] rout,
  input  logic [W-1:0] din,
  output logic [S-1:0] vout,
  input  logic [S-1:0] rin,
  output logic [W-1:0] dout,
  output logic         go,        // global go flag
  output logic         released   // 1 in the cycle go flips (all N arrived)
);

  localparam int unsigned CW = $clog2(N + 1);

  bar_state_t     state_q [S];
  logic [S-1:0]   lgo_q;
  logic [W-1:0]   data_q  [S];
  logic [CW-1:0]  cnt_q;
  logic           go_q;
  logic [S-1:0]   free, arrive;
  logic           cnt_en, go_next;

  always_comb begin
    for (int i = 0; i < S; i++) begin
      rout[i]   = (state_q[i] == BAR_IDLE);
      free[i]   = (state_q[i] == BAR_FREE);
      arrive[i] = vin[i] && rout[i];     // count_enable[i]
    end
  end

  assign cnt_en   = |arrive;
  assign released = (cnt_q == CW'(N));
  assign go_next  = go_q ^ released;
  assign go       = go_q;

  rr_arbiter #(.N(S)) u_arb (
    .clk, .rst_n,
    .req  (free & rin),
    .grant(vout)
  );

  always_comb begin
    dout = '0;
    for (int i = 0; i < S; i++)
      if (vout[i]) dout = data_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < S; i++) state_q[i] <= BAR_IDLE;
      lgo_q <= '0;
      cnt_q <= '0;
      go_q  <= 1'b0;
    end else begin
      for (int i = 0; i < S; i++) begin
        unique case (state_q[i])
          BAR_IDLE: if (arrive[i]) begin
                      state_q[i] <= BAR_WAIT;
                      lgo_q[i]   <= go_next;
                    end
          BAR_WAIT: if (lgo_q[i] != go_q) state_q[i] <= BAR_FREE;
          BAR_FREE: if (vout[i]) state_q[i] <= BAR_IDLE;
          default:  state_q[i] <= BAR_IDLE;
        endcase
      end
      go_q  <= go_next;
      cnt_q <= released ? CW'(cnt_en) : cnt_q + CW'(cnt_en);
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < S; i++)
      if (arrive[i]) data_q[i] <= din;
  end

  a_vin_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(vin));
  a_cnt_range:  assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= CW'(N));

endmodule
