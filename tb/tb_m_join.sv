// Testbench of m_join: random per-thread valid/ready patterns (one valid
// thread per input channel per cycle, as on a multithreaded channel) checked
// against a per-thread join computed here.
module tb_m_join;
  localparam int S = 4;
  logic [S-1:0] va, vb, ra, rb, v, r;
  int checks = 0, failures = 0, joined = 0;

  m_join #(.S(S)) dut (.va_in(va), .ra_out(ra), .vb_in(vb), .rb_out(rb), .v_out(v), .r_in(r));

  function automatic logic [S-1:0] onehot_or_zero();
    int k;
    k = $urandom % (S + 1);
    return (k == S) ? '0 : S'(1) << k;
  endfunction

  initial begin
    for (int n = 0; n < 500; n++) begin
      va = onehot_or_zero();
      vb = (($urandom % 2) == 0) ? va : onehot_or_zero();
      r  = S'($urandom);
      #1;
      for (int i = 0; i < S; i++) begin
        checks++;
        if (v[i] !== (va[i] & vb[i]) || ra[i] !== (r[i] & vb[i]) || rb[i] !== (r[i] & va[i])) begin
          failures++;
          $display("FAIL thread %0d va=%b vb=%b r=%b -> v=%b ra=%b rb=%b", i, va, vb, r, v, ra, rb);
        end
      end
      if (|(v & r)) joined++;
    end
    checks++;
    if (joined == 0) begin failures++; $display("FAIL no joined transfer"); end
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
