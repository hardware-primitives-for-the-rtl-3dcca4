// Multithreaded elastic fork (M-Fork).
//
// Copies a multithreaded elastic channel to two output channels A and B. The
// data wire is simply split; the handshake of each thread goes through its
// own single-thread eager fork, so each thread keeps its own done flags and a
// thread blocked on one output does not affect the other threads.
// S instances of el_fork, two flip-flops per thread.
module m_fork #(
  parameter int unsigned S = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [S-1:0] v_in,
  output logic [S-1:0] r_out,
  output logic [S-1:0] va_out,
  input  logic [S-1:0] ra_in,
  output logic [S-1:0] vb_out,
  input  logic [S-1:0] rb_in
);

  for (genvar i = 0; i < S; i++) begin : g_thr
    el_fork u_fork (
      .clk, .rst_n,
      .v_in  (v_in[i]),  .r_out(r_out[i]),
      .v1_out(va_out[i]), .r1_in(ra_in[i]),
      .v2_out(vb_out[i]), .r2_in(rb_in[i])
    );
  end

endmodule
