// Single-thread elastic branch ("if-then-else" split).
//
// The input item goes to output 1 when the condition is 1 and to output 2
// when it is 0; the input ready is the ready of the selected output. The
// condition is sampled together with the input valid. Combinational.
// Which output corresponds to condition = 1 is this design's choice.
module el_branch (
  input  logic cond,
  input  logic v_in,
  output logic r_out,
  output logic v1_out,
  input  logic r1_in,
  output logic v2_out,
  input  logic r2_in
);

  assign v1_out = v_in & cond;
  assign v2_out = v_in & ~cond;
  assign r_out  = cond ? r1_in : r2_in;

endmodule
