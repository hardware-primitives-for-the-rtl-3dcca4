// Single-thread elastic eager fork.
//
// One input channel is copied to two output channels. Each output may take its
// copy as soon as it is ready, independently of the other ("eager"); a done
// flip-flop per output remembers that this output already took the current
// item. The input is released (r_out) once every output has either taken the
// item earlier or takes it now; then both done flags clear. A done flag is
// kept until the input transfer completes, so it also holds when the input
// valid drops for a while, as on a multithreaded channel whose arbiter
// serves another thread in between.
// Outputs: v_k_out = v_in & !done_k. Input ready: (r1|done1) & (r2|done2).
// One flip-flop per output, as drawn for the eager fork; the exact gates are
// this design's reading of that drawing.
module el_fork (
  input  logic clk,
  input  logic rst_n,
  input  logic v_in,
  output logic r_out,
  output logic v1_out,
  input  logic r1_in,
  output logic v2_out,
  input  logic r2_in
);

  logic done1_q, done2_q;

  assign v1_out = v_in & ~done1_q;
  assign v2_out = v_in & ~done2_q;
  assign r_out  = (r1_in | done1_q) & (r2_in | done2_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done1_q <= 1'b0;
      done2_q <= 1'b0;
    end else begin
      done1_q <= (done1_q | (v1_out & r1_in)) & ~(v_in & r_out);
      done2_q <= (done2_q | (v2_out & r2_in)) & ~(v_in & r_out);
    end
  end

endmodule
