// Testbench of el_join: all eight input combinations against the join rule
// (output valid needs both inputs; an input may transfer only together with
// the other one when the output is ready).
module tb_el_join;
  logic v1, v2, r, r1, r2, v;
  int checks = 0, failures = 0;

  el_join dut (.v1_in(v1), .r1_out(r1), .v2_in(v2), .r2_out(r2), .v_out(v), .r_in(r));

  initial begin
    for (int k = 0; k < 8; k++) begin
      {v1, v2, r} = 3'(k);
      #1;
      checks++;
      if (v !== (v1 && v2) || r1 !== (r && v2) || r2 !== (r && v1)) begin
        failures++;
        $display("FAIL v1=%b v2=%b r=%b -> v=%b r1=%b r2=%b", v1, v2, r, v, r1, r2);
      end
      // no input transfers alone
      checks++;
      if ((v1 && r1) != (v2 && r2)) begin
        failures++;
        $display("FAIL one-sided transfer v1=%b v2=%b r=%b", v1, v2, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
