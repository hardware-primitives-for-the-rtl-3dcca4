// Multithreaded elastic join (M-Join).
//
// A multithreaded elastic channel carries the data of one thread per cycle and
// one valid/ready pair per thread. M-Join gathers the handshake pairs of its
// two input channels per thread and feeds each pair to its own single-thread
// join, so thread i's output is valid only when both inputs carry thread i.
// The data of the two inputs go to the function placed next to the join.
// Combinational: S instances of el_join, nothing else.
module m_join #(
  parameter int unsigned S = 8
) (
  input  logic [S-1:0] va_in,   // per-thread valid of input A
  output logic [S-1:0] ra_out,  // per-thread ready towards input A
  input  logic [S-1:0] vb_in,
  output logic [S-1:0] rb_out,
  output logic [S-1:0] v_out,
  input  logic [S-1:0] r_in
);

  for (genvar i = 0; i < S; i++) begin : g_thr
    el_join u_join (
      .v1_in (va_in[i]), .r1_out(ra_out[i]),
      .v2_in (vb_in[i]), .r2_out(rb_out[i]),
      .v_out (v_out[i]), .r_in  (r_in[i])
    );
  end

endmodule
