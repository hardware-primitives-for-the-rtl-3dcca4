// Testbench of m_fork: S threads each send numbered items through the fork;
// outputs A and B accept with random per-thread readiness. Per thread, each
// output must see every item exactly once and in order, and a thread's source
// may advance only after both copies are delivered. The source keeps one
// thread valid per cycle, picked anew every cycle, so a partly delivered
// item must be remembered while other threads use the channel.
module tb_m_fork;
  localparam int S = 4, NITEMS = 100;
  logic clk = 0, rst_n = 0;
  logic [S-1:0] v, r, va, ra, vb, rb;
  int item [S], gota [S], gotb [S];
  int checks = 0, failures = 0, early = 0, total = 0;
  int cur;

  m_fork #(.S(S)) dut (.clk, .rst_n, .v_in(v), .r_out(r), .va_out(va), .ra_in(ra), .vb_out(vb), .rb_in(rb));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < S; i++) begin item[i] = 0; gota[i] = 0; gotb[i] = 0; end
    v = '0; ra = '0; rb = '0; cur = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (total < S * NITEMS) begin
      logic [S-1:0] ta, tb, ti;
      @(negedge clk);
      // a multithreaded channel may offer a different thread every cycle
      cur = -1;
      if (($urandom % 5) != 0) begin
        int k;
        k = $urandom % S;
        if (item[k] < NITEMS) cur = k;
      end
      v  = (cur >= 0) ? S'(1) << cur : '0;
      ra = S'($urandom);
      rb = S'($urandom);
      #1;
      ta = va & ra; tb = vb & rb; ti = v & r;
      @(posedge clk);
      for (int i = 0; i < S; i++) begin
        if (ta[i]) begin
          checks++;
          if (gota[i] != item[i]) begin failures++; $display("FAIL A thread %0d", i); end
          gota[i]++;
        end
        if (tb[i]) begin
          checks++;
          if (gotb[i] != item[i]) begin failures++; $display("FAIL B thread %0d", i); end
          gotb[i]++;
        end
        if (ti[i]) begin
          checks++;
          if (gota[i] != item[i] + 1 || gotb[i] != item[i] + 1) begin
            failures++; $display("FAIL thread %0d advanced early", i);
          end
          item[i]++;
          total++;
        end else if (ta[i] != tb[i]) early++;
      end
    end
    checks++;
    if (early == 0) begin failures++; $display("FAIL no eager transfer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
