// Testbench of mt_barrier with S = N = 4 threads.
// For 30 phases: every thread delivers one item, in a random order with
// random gaps. No item may leave before the last thread has arrived; then
// every item must leave exactly once with its own data, one per cycle, under
// random downstream readiness. A thread is not ready again until its item has
// left. With the output ready, the first item leaves three cycles after the
// last arrival (counter reaches N, go flips, threads become FREE).
module tb_mt_barrier;
  localparam int S = 4, W = 16;
  logic clk = 0, rst_n = 0;
  logic [S-1:0] vin, rout, vout, rin;
  logic [W-1:0] din, dout;
  logic go, released;
  int checks = 0, failures = 0, releases = 0, cycle = 0;
  logic [W-1:0] held [S];
  bit held_v [S];
  int arrived;
  bit all_in;

  mt_barrier #(.S(S), .W(W), .N(S)) dut (.clk, .rst_n, .vin, .rout, .din, .vout, .rin, .dout, .go, .released);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (released) releases++;
    for (int i = 0; i < S; i++) if (vout[i]) begin
      chk(all_in, $sformatf("thread %0d left before all arrived", i));
      chk(held_v[i] && dout == held[i], $sformatf("thread %0d data %h exp %h", i, dout, held[i]));
      held_v[i] = 0;
    end
  end

  initial begin
    vin = '0; rin = '0; din = '0;
    for (int i = 0; i < S; i++) held_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 30; ph++) begin
      int order [S];
      for (int i = 0; i < S; i++) order[i] = i;
      order.shuffle();
      all_in = 0;
      arrived = 0;
      for (int n = 0; n < S; n++) begin
        int t, gap;
        t = order[n];
        gap = $urandom % 3;
        repeat (gap) begin
          @(negedge clk);
          rin = S'($urandom);
          vin = '0;
        end
        @(negedge clk);
        rin = S'($urandom);
        chk(rout[t], $sformatf("thread %0d not ready at phase start", t));
        vin = '0; vin[t] = 1'b1;
        din = W'($urandom);
        held[t] = din;
        held_v[t] = 1;
        if (n == S - 1) all_in = 1;
        @(posedge clk);
        #1 vin = '0;
      end
      // timing with the output ready: first departure three cycles after
      // the last arrival cycle
      if (ph % 2 == 0) begin
        int wait_c;
        wait_c = 0;
        @(negedge clk);
        rin = '1;
        chk(released && vout == '0, "release cycle");
        while (vout == '0 && wait_c < 10) begin @(negedge clk); wait_c++; end
        chk(wait_c == 2, $sformatf("first departure %0d cycles after release, expected 2", wait_c));
      end
      begin
        int guard;
        guard = 0;
        while ((held_v[0] || held_v[1] || held_v[2] || held_v[3]) && guard < 200) begin
          @(negedge clk);
          rin = S'($urandom);
          for (int i = 0; i < S; i++) if (held_v[i]) chk(!rout[i], "ready while holding");
          guard++;
        end
        chk(guard < 200, "items did not all leave");
      end
    end
    chk(releases == 30, $sformatf("releases=%0d expected 30", releases));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
