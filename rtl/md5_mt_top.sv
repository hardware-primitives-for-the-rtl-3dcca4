// Multithreaded elastic MD5 engine.
//
// S independent threads each hash a 512-bit block while sharing one MD5 round
// datapath. The loop is built from the multithreaded elastic primitives:
//
//   msg  ch --\                                   /-- path A (done) --> final add --> M-Fork --> digest ch
//              M-Join --> M-Merge --> MEB_in --> md5_round --> MEB_out --> barrier --> M-Branch       \--> chain ch
//   ihv  ch --/             ^                                                  |
//                           \------------------------ path B (next round) -----/
//
// - The message block and the chaining value it starts from arrive on two
//   multithreaded elastic channels and are paired per thread by M-Join.
// - MEB_in and MEB_out are reduced MEBs; the 16 unrolled steps of one round
//   sit between them, configured by a global round counter.
// - The barrier after MEB_out holds every thread until all S threads have
//   finished the current round; the release increments the round counter, so
//   all threads run the same round. After round 3 the counter wraps to 0 and
//   M-Branch sends the released threads to the exit (condition = counter is
//   0), otherwise back to M-Merge for the next round.
// - On exit the chaining value is added word-wise to the state (RFC 1321) and
//   M-Fork offers the resulting digest both on the digest channel and on the
//   chain channel, from which the next block of the same message takes its
//   chaining value.
// Because the barrier waits for all S threads, every thread must be given a
// block before any round completes. A thread is admitted on the input side
// only while it has no block in the loop (busy flag), which also keeps the two
// M-Merge paths from being valid in the same cycle.
// Channels: one-hot-per-thread valid and ready, one data word; a transfer on
// thread i happens when valid[i] && ready[i]. Input valids must not depend on
// the ready outputs.
// Following the document: round structure, MEBs around the round stage,
// barrier after the output buffer, round counter advanced on release. Choices
// of this design: the chaining-value input/output channels, the busy flag,
// the branch condition and the final addition on the exit path.
module md5_mt_top
  import md5_pkg::*;
#(
  parameter int unsigned S = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // message block channel
  input  logic [S-1:0] msg_valid,
  output logic [S-1:0] msg_ready,
  input  logic [511:0] msg_data,
  // chaining value channel (MD5_IV for a message's first block)
  input  logic [S-1:0] ihv_valid,
  output logic [S-1:0] ihv_ready,
  input  logic [127:0] ihv_data,
  // digest channel
  output logic [S-1:0] dig_valid,
  input  logic [S-1:0] dig_ready,
  output logic [127:0] dig_data,
  // chaining value out channel (same value as the digest)
  output logic [S-1:0] chn_valid,
  input  logic [S-1:0] chn_ready,
  output logic [127:0] chn_data,
  // status
  output logic [1:0]   round
);

  localparam int unsigned TW = MD5_TOK_W;

  logic [S-1:0] j_v, j_r, a_v, a_r;
  logic [S-1:0] b_v, b_r;          // loop path into M-Merge
  logic [S-1:0] m_v, m_r;          // M-Merge -> MEB_in
  logic [S-1:0] i_v, i_r;          // MEB_in -> round -> MEB_out
  logic [S-1:0] o_v, o_r;          // MEB_out -> barrier
  logic [S-1:0] br_v, br_r;        // barrier -> M-Branch
  logic [S-1:0] x_v, x_r;          // exit path -> M-Fork
  logic [S-1:0] busy_q;
  logic [1:0]   round_q;
  logic         released, done;
  md5_tok_t     a_tok, m_tok, i_tok, o_tok, br_tok;

  // ---- input: pair message and chaining value per thread ----
  m_join #(.S(S)) u_join (
    .va_in(msg_valid), .ra_out(msg_ready),
    .vb_in(ihv_valid), .rb_out(ihv_ready),
    .v_out(j_v),       .r_in  (j_r)
  );

  assign a_v = j_v & ~busy_q;
  assign j_r = a_r & ~busy_q;
  always_comb begin
    a_tok.msg = msg_data;
    a_tok.ihv = ihv_data;
    a_tok.st  = ihv_data;
  end

  m_merge #(.S(S), .W(TW)) u_merge (
    .clk, .rst_n,
    .va_in(a_v), .ra_out(a_r), .da_in(a_tok),
    .vb_in(b_v), .rb_out(b_r), .db_in(br_tok),
    .v_out(m_v), .r_in(m_r),   .d_out(m_tok)
  );

  // ---- round stage between two reduced MEBs ----
  reduced_meb #(.S(S), .W(TW)) u_meb_in (
    .clk, .rst_n,
    .vin(m_v), .rout(m_r), .din(m_tok),
    .vout(i_v), .rin(i_r), .dout(i_tok)
  );

  md5_tok_t r_tok;
  always_comb begin
    r_tok.msg = i_tok.msg;
    r_tok.ihv = i_tok.ihv;
  end
  md5_round u_round (
    .round (round_q),
    .msg   (i_tok.msg),
    .st_in (i_tok.st),
    .st_out(r_tok.st)
  );

  reduced_meb #(.S(S), .W(TW)) u_meb_out (
    .clk, .rst_n,
    .vin(i_v), .rout(i_r), .din(r_tok),
    .vout(o_v), .rin(o_r), .dout(o_tok)
  );

  // ---- barrier: all threads finish a round before the next one starts ----
  logic go_unused;
  mt_barrier #(.S(S), .W(TW), .N(S)) u_bar (
    .clk, .rst_n,
    .vin(o_v), .rout(o_r), .din(o_tok),
    .vout(br_v), .rin(br_r), .dout(br_tok),
    .go(go_unused), .released
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) round_q <= '0;
    else if (released) round_q <= round_q + 2'd1;
  end
  assign round = round_q;
  assign done  = (round_q == 2'd0);

  m_branch #(.S(S)) u_branch (
    .cond(done),
    .v_in(br_v), .r_out(br_r),
    .va_out(x_v), .ra_in(x_r),
    .vb_out(b_v), .rb_in(b_r)
  );

  // ---- exit: final addition, digest to two consumers ----
  logic [127:0] digest;
  assign digest = md5_add(br_tok.st, br_tok.ihv);

  m_fork #(.S(S)) u_fork (
    .clk, .rst_n,
    .v_in(x_v), .r_out(x_r),
    .va_out(dig_valid), .ra_in(dig_ready),
    .vb_out(chn_valid), .rb_in(chn_ready)
  );
  assign dig_data = digest;
  assign chn_data = digest;

  // ---- per-thread busy flag: one block per thread in the loop ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_q <= '0;
    else        busy_q <= (busy_q | (a_v & a_r)) & ~(x_v & x_r);
  end

endmodule
