// Testbench of el_branch: all input combinations; the item must appear on
// exactly the output chosen by the condition (1 -> output 1) and the input
// ready must be that output's ready.
module tb_el_branch;
  logic c, v, r1, r2, r, v1, v2;
  int checks = 0, failures = 0;

  el_branch dut (.cond(c), .v_in(v), .r_out(r), .v1_out(v1), .r1_in(r1), .v2_out(v2), .r2_in(r2));

  initial begin
    for (int k = 0; k < 16; k++) begin
      {c, v, r1, r2} = 4'(k);
      #1;
      checks++;
      if (v1 !== (v && c) || v2 !== (v && !c) || r !== (c ? r1 : r2)) begin
        failures++;
        $display("FAIL c=%b v=%b r1=%b r2=%b -> v1=%b v2=%b r=%b", c, v, r1, r2, v1, v2, r);
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
