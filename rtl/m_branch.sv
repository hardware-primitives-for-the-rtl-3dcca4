// Multithreaded elastic branch (M-Branch).
//
// Steers each item of a multithreaded elastic channel to path A (condition 1)
// or path B (condition 0). The asserted valid bit of the input tells which
// thread the condition belongs to; each thread's handshake goes through its
// own single-thread branch, all sharing the condition flag. The data go to
// both paths. Combinational: S instances of el_branch.
module m_branch #(
  parameter int unsigned S = 8
) (
  input  logic         cond,
  input  logic [S-1:0] v_in,
  output logic [S-1:0] r_out,
  output logic [S-1:0] va_out,
  input  logic [S-1:0] ra_in,
  output logic [S-1:0] vb_out,
  input  logic [S-1:0] rb_in
);

  for (genvar i = 0; i < S; i++) begin : g_thr
    el_branch u_br (
      .cond,
      .v_in  (v_in[i]),  .r_out(r_out[i]),
      .v1_out(va_out[i]), .r1_in(ra_in[i]),
      .v2_out(vb_out[i]), .r2_in(rb_in[i])
    );
  end

endmodule
