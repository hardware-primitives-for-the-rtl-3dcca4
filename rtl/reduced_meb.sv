// Reduced multithreaded elastic buffer (reduced MEB).
//
// A multithreaded elastic buffer for S threads with S+1 storage slots instead
// of 2*S: each thread owns one main register, and one auxiliary register is
// shared dynamically by all threads, held by at most one thread at a time.
//
// Per-thread control (one copy of a single-thread elastic buffer's control):
//   EMPTY --push--> HALF (item written into the thread's main register)
//   HALF  --pop-->  EMPTY;  push and pop together: stays HALF, main reloaded
//   HALF  --push, no pop, shared register free (goFull)--> FULL, item written
//         into the shared register
//   FULL  --pop (goHalf)--> HALF, main register refilled from the shared one
// A two-state flag (shared register empty/full) is set by goFull and cleared
// by goHalf. Upstream ready of thread i: EMPTY, or HALF while the shared
// register is empty; FULL threads are not ready. Ready depends on registered
// state only, so in the refill cycle the freed shared register is offered
// upstream only from the next cycle on.
// Output: a round-robin arbiter picks one thread among those holding data
// whose downstream ready is asserted; vout is its grant (combinational from
// rin, same cycle) and dout is that thread's main register.
// Interface: push on thread i when vin[i] && rout[i]; pop when vout[i]
// (vout already includes rin). At most one vin bit per cycle.
// Latency 1 cycle from push to the item being offered at the output; a single
// thread alone streams at one item per cycle.
// Structure, states and transitions follow the document; the arbiter policy,
// reset to EMPTY and the data-width default are this design's choices.
module reduced_meb
  import mt_pkg::*;
#(
  parameter int unsigned S = 8,
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [S-1:0] vin,
  output logic [S-1:0] rout,
  input  logic [W-1:0] din,
  output logic [S-1:0] vout,
  input  logic [S-1:0] rin,
  output logic [W-1:0] dout
);

  eb_state_t      state_q [S];
  logic [W-1:0]   main_q  [S];
  logic [W-1:0]   shared_q;
  logic           shared_full_q;   // two-state FSM of the shared register

  logic [S-1:0]   has_data, push, pop, go_full, go_half;

  always_comb begin
    for (int i = 0; i < S; i++) begin
      has_data[i] = (state_q[i] != EB_EMPTY);
      rout[i]     = (state_q[i] == EB_EMPTY) ||
                    ((state_q[i] == EB_HALF) && !shared_full_q);
      push[i]     = vin[i] && rout[i];
      pop[i]      = vout[i];
      go_full[i]  = (state_q[i] == EB_HALF) && push[i] && !pop[i];
      go_half[i]  = (state_q[i] == EB_FULL) && pop[i];
    end
  end

  rr_arbiter #(.N(S)) u_arb (
    .clk, .rst_n,
    .req  (has_data & rin),
    .grant(vout)
  );

  always_comb begin
    dout = '0;
    for (int i = 0; i < S; i++)
      if (vout[i]) dout = main_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < S; i++) state_q[i] <= EB_EMPTY;
      shared_full_q <= 1'b0;
    end else begin
      for (int i = 0; i < S; i++) begin
        unique case (state_q[i])
          EB_EMPTY: if (push[i]) state_q[i] <= EB_HALF;
          EB_HALF:  if (go_full[i]) state_q[i] <= EB_FULL;
                    else if (pop[i] && !push[i]) state_q[i] <= EB_EMPTY;
          EB_FULL:  if (pop[i]) state_q[i] <= EB_HALF;
          default:  state_q[i] <= EB_EMPTY;
        endcase
      end
      if (|go_full)      shared_full_q <= 1'b1;
      else if (|go_half) shared_full_q <= 1'b0;
    end
  end

  // Datapath: main register of thread i loads din (mux input 0) or the
  // shared register (mux input 1, refill on goHalf).
  always_ff @(posedge clk) begin
    for (int i = 0; i < S; i++) begin
      if (go_half[i])
        main_q[i] <= shared_q;
      else if (push[i] && !go_full[i])
        main_q[i] <= din;
    end
    if (|go_full) shared_q <= din;
  end

  a_vin_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(vin));
  a_one_owner:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(go_full));
  a_no_dual:    assert property (@(posedge clk) disable iff (!rst_n) !(|go_full && |go_half));

endmodule
