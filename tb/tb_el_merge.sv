// Testbench of el_merge: every legal combination (at most one input valid)
// with random data; output valid, readies and the selected data are compared
// with the merge rule.
module tb_el_merge;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic v1, v2, r, r1, r2, v;
  logic [W-1:0] d1, d2, d;
  int checks = 0, failures = 0;

  el_merge #(.W(W)) dut (.clk, .rst_n, .v1_in(v1), .r1_out(r1), .d1_in(d1),
                         .v2_in(v2), .r2_out(r2), .d2_in(d2), .v_out(v), .r_in(r), .d_out(d));

  initial begin
    for (int n = 0; n < 20; n++)
      for (int k = 0; k < 8; k++) begin
        {v1, v2, r} = 3'(k);
        if (v1 && v2) continue;
        d1 = W'($urandom); d2 = W'($urandom);
        #1;
        checks++;
        if (v !== (v1 || v2) || r1 !== r || r2 !== r ||
            (v1 && d !== d1) || (v2 && d !== d2)) begin
          failures++;
          $display("FAIL v1=%b v2=%b r=%b -> v=%b r1=%b r2=%b d=%h", v1, v2, r, v, r1, r2, d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
