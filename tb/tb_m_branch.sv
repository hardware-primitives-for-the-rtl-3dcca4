// Testbench of m_branch: random thread, condition and readies; the valid of
// the active thread must appear on path A when the condition is 1 and on
// path B when it is 0, and each thread's input ready is the ready of its
// selected path.
module tb_m_branch;
  localparam int S = 4;
  logic c;
  logic [S-1:0] v, r, va, ra, vb, rb;
  int checks = 0, failures = 0;

  m_branch #(.S(S)) dut (.cond(c), .v_in(v), .r_out(r), .va_out(va), .ra_in(ra), .vb_out(vb), .rb_in(rb));

  initial begin
    for (int n = 0; n < 500; n++) begin
      int k;
      k = $urandom % (S + 1);
      v  = (k == S) ? '0 : S'(1) << k;
      c  = 1'($urandom);
      ra = S'($urandom);
      rb = S'($urandom);
      #1;
      checks++;
      if (va !== (c ? v : '0) || vb !== (c ? '0 : v) || r !== (c ? ra : rb)) begin
        failures++;
        $display("FAIL c=%b v=%b ra=%b rb=%b -> va=%b vb=%b r=%b", c, v, ra, rb, va, vb, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
