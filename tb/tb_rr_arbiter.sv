// Testbench of rr_arbiter: random request vectors; the grant must be one-hot
// (or zero with no request) and must go to the first requester after the
// previously granted thread, per a round-robin model kept here. Also checks
// that a thread that keeps requesting is served within N grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant, exp;
  int last = N - 1;
  int wait_cnt [N];
  int checks = 0, failures = 0;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .grant);

  always #5 clk = ~clk;

  initial begin
    req = '0;
    for (int i = 0; i < N; i++) wait_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req = N'($urandom);
      if (n % 7 == 0) req = '1;
      #1;
      exp = '0;
      for (int k = 1; k <= N; k++) begin
        int idx;
        idx = (last + k) % N;
        if (req[idx]) begin exp[idx] = 1'b1; break; end
      end
      checks++;
      if (grant !== exp) begin
        failures++;
        $display("FAIL req=%b last=%0d grant=%b exp=%b", req, last, grant, exp);
      end
      for (int i = 0; i < N; i++) begin
        if (grant[i]) begin last = i; wait_cnt[i] = 0; end
        else if (!req[i]) wait_cnt[i] = 0;
        else if (|grant) wait_cnt[i]++;
        if (wait_cnt[i] >= N) begin failures++; checks++; $display("FAIL thread %0d starved", i); end
      end
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
