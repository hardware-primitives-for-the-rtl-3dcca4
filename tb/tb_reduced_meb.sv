// Testbench of reduced_meb with S = 3 threads.
//  1. Capacity: with the output stalled, every thread takes one item, then
//     exactly one thread can take a second item (shared register), after
//     which no thread is ready. Releasing the output drains the two items of
//     that thread in order (main register refilled from the shared one).
//  2. Rate: one thread alone streams one item per cycle, each item offered
//     one cycle after it was written.
//  3. Random traffic from an upstream that, like an MEB arbiter, offers one
//     ready thread per cycle, against random downstream readiness; per-thread
//     order, no loss, and occupancy limits (2 per thread, S+1 in total, at
//     most one thread holding two) are checked against a model kept here.
module tb_reduced_meb;
  localparam int S = 3, W = 16;
  logic clk = 0, rst_n = 0;
  logic [S-1:0] vin, rout, vout, rin;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0, cycle = 0;
  logic [W-1:0] q [S][$];
  int shared_uses = 0;

  reduced_meb #(.S(S), .W(W)) dut (.clk, .rst_n, .vin, .rout, .din, .vout, .rin, .dout);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  // Scoreboard on every clock edge.
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < S; i++) begin
      if (vout[i]) begin
        chk(rin[i], "vout without rin");
        chk(q[i].size() > 0 && dout == q[i][0], $sformatf("thread %0d data %h", i, dout));
        if (q[i].size() > 0) void'(q[i].pop_front());
      end
      if (vin[i] && rout[i]) q[i].push_back(din);
    end
  end

  // Occupancy limits after each edge.
  always @(negedge clk) if (rst_n) begin
    int tot, twos;
    tot = 0; twos = 0;
    for (int i = 0; i < S; i++) begin
      tot += q[i].size();
      if (q[i].size() == 2) twos++;
      if (q[i].size() > 2) chk(0, "more than two items in a thread");
    end
    if (twos == 1) shared_uses++;
    if (twos > 1 || tot > S + 1) chk(0, "capacity exceeded");
  end

  task automatic push(input int t, input logic [W-1:0] d);
    @(negedge clk);
    vin = '0; vin[t] = 1'b1; din = d;
    #1;
    chk(rout[t], $sformatf("thread %0d not ready", t));
    @(posedge clk);
    #1 vin = '0;
  endtask

  initial begin
    vin = '0; rin = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- 1. capacity ----
    for (int t = 0; t < S; t++) push(t, W'(16'h100 + t));
    push(1, 16'h201);
    @(negedge clk);
    chk(rout == '0, $sformatf("after S+1 items rout=%b, expected 000", rout));
    chk(vout == '0, "output valid while stalled");
    rin = 3'b010;                    // release thread 1 only
    #1 chk(vout == 3'b010 && dout == 16'h101, "first item of thread 1");
    chk(rout == 3'b000, "shared register offered in the refill cycle");
    @(negedge clk);
    chk(rout == 3'b111, "freed shared register not offered after the refill cycle");
    #1 chk(vout == 3'b010 && dout == 16'h201, "refilled item of thread 1");
    @(negedge clk);
    rin = '0;
    chk(rout == 3'b111, $sformatf("after drain rout=%b, expected 111", rout));
    rin = '1;
    repeat (3) @(negedge clk);
    chk(q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0, "capacity phase drained");
    // ---- 2. single-thread rate and latency ----
    begin
      int first, last, n;
      n = 0;
      @(negedge clk);
      for (int k = 0; k < 20; k++) begin
        vin = 3'b001; din = W'(16'h300 + k);
        #1 chk(rout[0], "streaming thread not ready");
        if (k > 0) chk(vout[0] && dout == W'(16'h300 + k - 1), "item offered one cycle after write");
        @(negedge clk);
      end
      vin = '0;
      #1 chk(vout[0] && dout == 16'h313, "last streamed item");
      @(negedge clk);
    end
    // ---- 3. random traffic ----
    begin
      int sent [S];
      int total;
      for (int i = 0; i < S; i++) sent[i] = 0;
      total = 0;
      for (int n = 0; n < 3000; n++) begin
        logic [S-1:0] cand;
        @(negedge clk);
        rin = S'($urandom);
        if (n % 200 < 60) rin[1] = 1'b0;  // long stall of one thread
        cand = rout;
        vin = '0;
        if (cand != 0 && ($urandom % 4) != 0) begin
          int k;
          do k = $urandom % S; while (!cand[k]);
          vin[k] = 1'b1;
          din = W'((k << 12) | (sent[k] & 12'hfff));
          sent[k]++;
        end
      end
      @(negedge clk);
      vin = '0; rin = '1;
      repeat (10) @(negedge clk);
      chk(q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0, "random phase drained");
      chk(shared_uses > 0, "shared register never used");
      $display("cycles with a thread holding two items: %0d", shared_uses);
    end
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
