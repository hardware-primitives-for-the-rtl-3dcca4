// Testbench of md5_round: hashes blocks by passing the state through the
// stage for rounds 0..3 and adding the chaining value, then compares with the
// published digests of "" and "abc" and with a step-by-step reference model
// on random blocks and chaining values.
module tb_md5_round;
  import md5_ref_pkg::*;

  logic [1:0]   round;
  logic [511:0] msg;
  logic [127:0] st_in, st_out;
  int checks = 0, failures = 0;

  md5_round dut (.round, .msg, .st_in, .st_out);

  task automatic hash(input logic [127:0] h, input logic [511:0] m, output logic [127:0] dg);
    logic [127:0] s;
    s = h;
    msg = m;
    for (int r = 0; r < 4; r++) begin
      round = 2'(r);
      st_in = s;
      #1;
      s = st_out;
    end
    for (int w = 0; w < 4; w++) dg[32*w +: 32] = s[32*w +: 32] + h[32*w +: 32];
  endtask

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] dg, h;
    logic [511:0] m;
    hash(ref_iv(), ref_pad(""), dg);
    check(dg, ref_from_hex(128'hd41d8cd98f00b204e9800998ecf8427e), "md5(\"\")");
    hash(ref_iv(), ref_pad("abc"), dg);
    check(dg, ref_from_hex(128'h900150983cd24fb0d6963f7d28e17f72), "md5(\"abc\")");
    for (int n = 0; n < 50; n++) begin
      for (int w = 0; w < 16; w++) m[32*w +: 32] = $urandom;
      for (int w = 0; w < 4; w++)  h[32*w +: 32] = $urandom;
      hash(h, m, dg);
      check(dg, ref_compress(h, m), "random block");
    end
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
