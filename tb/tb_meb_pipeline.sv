// Workload testbench: two-thread flow through a two-stage pipeline of
// reduced MEBs (source -> MEB#0 -> MEB#1 -> sink), the situation used to
// explain what sharing the auxiliary register costs.
//  Phase 1: both threads flow; the channel carries one item per cycle and
//           each thread gets half of it.
//  Phase 2: thread B is blocked at the sink. Its items fill the shared
//           registers of both stages up to the source, after which thread A,
//           the only active thread, gets exactly one item every two cycles.
//  Phase 3: B is released; everything drains in order.
//  Phase 4: only thread A has data and gets one item per cycle.
// Per-thread order and completeness are checked throughout.
module tb_meb_pipeline;
  localparam int S = 2, W = 16;
  logic clk = 0, rst_n = 0;
  logic [S-1:0] v0, r0, v1, r1, v2, r2;
  logic [W-1:0] d0, d1, d2;
  int checks = 0, failures = 0, cycle = 0;
  int sent [S], rcvd [S];
  bit  src_on [S];
  int  last_src;
  int  out_cnt [S];

  reduced_meb #(.S(S), .W(W)) meb0 (.clk, .rst_n, .vin(v0), .rout(r0), .din(d0), .vout(v1), .rin(r1), .dout(d1));
  reduced_meb #(.S(S), .W(W)) meb1 (.clk, .rst_n, .vin(v1), .rout(r1), .din(d1), .vout(v2), .rin(r2), .dout(d2));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  // Source: like an upstream arbiter, alternates between the threads that
  // have data and are ready at MEB#0.
  always_comb begin
    v0 = '0;
    d0 = '0;
    for (int k = 1; k <= S; k++) begin
      int t;
      t = (last_src + k) % S;
      if (v0 == '0 && src_on[t] && r0[t]) begin
        v0[t] = 1'b1;
        d0 = W'((t << 12) | (sent[t] & 12'hfff));
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    for (int t = 0; t < S; t++) begin
      if (v0[t]) begin sent[t]++; last_src = t; end
      if (v2[t]) begin
        chk(d2 == W'((t << 12) | (rcvd[t] & 12'hfff)), $sformatf("thread %0d item %0d data %h", t, rcvd[t], d2));
        rcvd[t]++;
        out_cnt[t]++;
      end
    end
  end

  task automatic window(input int n, output int a, output int b);
    @(negedge clk);
    out_cnt[0] = 0; out_cnt[1] = 0;
    repeat (n) @(negedge clk);
    a = out_cnt[0]; b = out_cnt[1];
  endtask

  initial begin
    int a, b;
    for (int t = 0; t < S; t++) begin sent[t] = 0; rcvd[t] = 0; src_on[t] = 1; out_cnt[t] = 0; end
    last_src = S - 1;
    r2 = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- phase 1 ----
    repeat (10) @(negedge clk);
    window(40, a, b);
    chk(a == 20 && b == 20, $sformatf("phase 1: A=%0d B=%0d of 40 cycles, expected 20/20", a, b));
    // ---- phase 2 ----
    r2 = 2'b01;                         // block thread B (index 1)
    repeat (10) @(negedge clk);
    chk(meb0.shared_full_q && meb1.shared_full_q, "blocked thread holds both shared registers");
    chk(r0[1] == 1'b0, "back-pressure of B reached the source");
    window(40, a, b);
    chk(b == 0, "blocked thread delivered");
    chk(a == 20, $sformatf("phase 2: A=%0d of 40 cycles, expected 20 (half rate)", a));
    $display("phase 2: thread A %0d items in 40 cycles with B blocked", a);
    // ---- phase 3 ----
    src_on[0] = 0; src_on[1] = 0;
    r2 = 2'b11;
    repeat (10) @(negedge clk);
    chk(rcvd[0] == sent[0] && rcvd[1] == sent[1], "drain after release");
    // ---- phase 4 ----
    src_on[0] = 1;
    repeat (5) @(negedge clk);
    window(40, a, b);
    chk(a == 40, $sformatf("phase 4: A alone %0d of 40 cycles, expected 40", a));
    src_on[0] = 0;
    repeat (5) @(negedge clk);
    chk(rcvd[0] == sent[0] && rcvd[1] == sent[1], "final drain");
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
