// Multithreaded elastic merge (M-Merge).
//
// Merges the two paths A and B of a multithreaded elastic channel (as created
// by M-Branch) back into one channel. Each thread's handshake goes through its
// own single-thread merge; because only one path is active at a time, a
// single data multiplexer shared by all threads is enough. Its select is the
// OR of the path-A valids of all threads: path A's data when any thread is
// valid on A, otherwise path B's. Combinational.
// An assertion checks that the two paths are never valid in the same cycle,
// which the document states as a property of branch/merge pairs.
module m_merge #(
  parameter int unsigned S = 8,
  parameter int unsigned W = 32
) (
  input  logic         clk,    // used only by the assertions
  input  logic         rst_n,
  input  logic [S-1:0] va_in,
  output logic [S-1:0] ra_out,
  input  logic [W-1:0] da_in,
  input  logic [S-1:0] vb_in,
  output logic [S-1:0] rb_out,
  input  logic [W-1:0] db_in,
  output logic [S-1:0] v_out,
  input  logic [S-1:0] r_in,
  output logic [W-1:0] d_out
);

  logic sel_a;

  // One el_merge per thread carries the handshake; its data port is unused
  // because the data multiplexer is shared by all threads.
  for (genvar i = 0; i < S; i++) begin : g_thr
    logic d_unused;
    el_merge #(.W(1)) u_mrg (
      .clk, .rst_n,
      .v1_in(va_in[i]), .r1_out(ra_out[i]), .d1_in(1'b0),
      .v2_in(vb_in[i]), .r2_out(rb_out[i]), .d2_in(1'b0),
      .v_out(v_out[i]), .r_in(r_in[i]),     .d_out(d_unused)
    );
  end

  assign sel_a = |va_in;
  assign d_out = sel_a ? da_in : db_in;

  a_one_path: assert property (@(posedge clk) disable iff (!rst_n) !((|va_in) && (|vb_in)));

endmodule
