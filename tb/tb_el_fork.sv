// Testbench of el_fork: a source offers numbered items; the two outputs
// accept them with independent random readiness. Each output must receive
// every item exactly once and in order, the source must advance only when
// both outputs have their copy, and an output that took its copy early must
// not see it again (eager behaviour, counted).
module tb_el_fork;
  logic clk = 0, rst_n = 0;
  logic v, r, v1, r1, v2, r2;
  int item = 0, got1 = 0, got2 = 0, early = 0;
  int checks = 0, failures = 0;
  bit t1, t2, ti;
  localparam int NITEMS = 200;

  el_fork dut (.clk, .rst_n, .v_in(v), .r_out(r), .v1_out(v1), .r1_in(r1), .v2_out(v2), .r2_in(r2));

  always #5 clk = ~clk;

  initial begin
    v = 0; r1 = 0; r2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (item < NITEMS) begin
      @(negedge clk);
      if (!v || ti) v = ($urandom % 4) != 0;   // valid persists until transfer
      r1 = ($urandom % 3) != 0;
      r2 = ($urandom % 3) != 0;
      #1;
      t1 = v1 && r1; t2 = v2 && r2; ti = v && r;
      @(posedge clk);
      if (t1) begin
        checks++;
        if (got1 != item) begin failures++; $display("FAIL out1 got item %0d expected %0d", item, got1); end
        got1++;
      end
      if (t2) begin
        checks++;
        if (got2 != item) begin failures++; $display("FAIL out2 got item %0d expected %0d", item, got2); end
        got2++;
      end
      if (t1 != t2 && !ti) early++;
      if (ti) begin
        checks++;
        if (got1 != item + 1 || got2 != item + 1) begin
          failures++;
          $display("FAIL source advanced at item %0d with got1=%0d got2=%0d", item, got1, got2);
        end
        item++;
      end
    end
    checks++;
    if (early == 0) begin failures++; $display("FAIL no eager transfer seen"); end
    $display("items=%0d eager transfers=%0d", item, early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
