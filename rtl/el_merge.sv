// Single-thread elastic merge.
//
// Joins the two paths created by a branch back into one channel. Only one of
// the two inputs is valid at a time (the branch sends each item to one path),
// so the output valid is the OR of the input valids, both inputs receive the
// downstream ready, and the data multiplexer picks input 1 whenever it is
// valid. Combinational. An assertion flags two valid inputs in one cycle.
module el_merge #(
  parameter int unsigned W = 32
) (
  input  logic         clk,    // used only by the assertion
  input  logic         rst_n,
  input  logic         v1_in,
  output logic         r1_out,
  input  logic [W-1:0] d1_in,
  input  logic         v2_in,
  output logic         r2_out,
  input  logic [W-1:0] d2_in,
  output logic         v_out,
  input  logic         r_in,
  output logic [W-1:0] d_out
);

  assign v_out  = v1_in | v2_in;
  assign r1_out = r_in;
  assign r2_out = r_in;
  assign d_out  = v1_in ? d1_in : d2_in;

  a_one_path: assert property (@(posedge clk) disable iff (!rst_n) !(v1_in && v2_in));

endmodule
