// Single-thread elastic join.
//
// Two elastic input channels converge on one output channel. The output is
// valid only when both inputs are valid; an input is told it may transfer only
// when the other input is valid too and the output is ready, so both inputs
// move in the same cycle or neither does. Purely combinational, no state.
// Only the handshake is handled here; the data of the two inputs go to the
// function that consumes them. The gate-level form is the usual join of
// synchronous elastic circuits; the document shows the block without stating
// the gates.
module el_join (
  input  logic v1_in,   // valid of input 1
  output logic r1_out,  // ready towards input 1
  input  logic v2_in,   // valid of input 2
  output logic r2_out,  // ready towards input 2
  output logic v_out,   // valid of the joined output
  input  logic r_in     // ready from downstream
);

  assign v_out  = v1_in & v2_in;
  assign r1_out = r_in & v2_in;
  assign r2_out = r_in & v1_in;

endmodule
