// End-to-end testbench of md5_mt_top with S = 16 threads (the default is 8);
// otherwise identical to tb_md5_mt_top.
//
// Every thread hashes NB blocks. Block 0 of a thread is either a published
// test vector ("" or "abc", single-block messages) or random data; later
// blocks continue the thread's message, so their chaining value is the
// digest of the previous block, taken from the engine's chain output
// channel and fed back into the chaining input channel by this testbench.
// Message and chaining sources offer a (possibly different) pending thread
// each cycle, independently of the ready signals; digest and chain sinks are
// ready at random. Each digest is compared with a step-by-step reference
// model and, for the test vectors, with the published digest.
// Counted mechanisms (each must occur): join waiting for its second input,
// admission refused to a thread with a block in flight, M-Merge path A (new
// block) and path B (next round), arbitration between several released
// threads at the barrier output, a barrier holding finished threads, barrier
// release, M-Branch exit, a released thread held back by the digest or chain
// sink, and a round-counter wrap. The
// number of barrier releases must be 4 per batch of S blocks.
module tb_md5_mt_top16;
  import md5_ref_pkg::*;

  localparam int S  = 16;
  localparam int NB = 4;

  logic clk = 0, rst_n = 0;
  logic [S-1:0] msg_valid, msg_ready, ihv_valid, ihv_ready;
  logic [S-1:0] dig_valid, dig_ready, chn_valid, chn_ready;
  logic [511:0] msg_data;
  logic [127:0] ihv_data, dig_data, chn_data;
  logic [1:0]   round;

  md5_mt_top #(.S(S)) dut (
    .clk, .rst_n,
    .msg_valid, .msg_ready, .msg_data,
    .ihv_valid, .ihv_ready, .ihv_data,
    .dig_valid, .dig_ready, .dig_data,
    .chn_valid, .chn_ready, .chn_data,
    .round
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  logic [511:0] blk   [S][NB];
  logic [127:0] expd  [S][NB];   // expected digest of each block
  logic [127:0] known [S];       // published digest of block 0, or 0
  int msg_idx [S], ihv_idx [S], dig_idx [S], chn_idx [S];
  logic [127:0] chain_in [S][$]; // chaining values fed back
  int n_join_wait = 0, n_busy_block = 0, n_path_a = 0, n_path_b = 0,
      n_arb = 0, n_bar_hold = 0, n_release = 0, n_exit = 0, n_backpressure = 0,
      n_wrap = 0;
  int dig_total = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  function automatic int popcount(input logic [S-1:0] x);
    int c = 0;
    for (int i = 0; i < S; i++) c += int'(x[i]);
    return c;
  endfunction

  // ---- stimulus and expected values ----
  initial begin
    for (int t = 0; t < S; t++) begin
      logic [127:0] h;
      h = ref_iv();
      known[t] = '0;
      for (int b = 0; b < NB; b++) begin
        if (b == 0 && t == 0) begin
          blk[t][b] = ref_pad("");
          known[t] = ref_from_hex(128'hd41d8cd98f00b204e9800998ecf8427e);
        end else if (b == 0 && t == 1) begin
          blk[t][b] = ref_pad("abc");
          known[t] = ref_from_hex(128'h900150983cd24fb0d6963f7d28e17f72);
        end else
          for (int w = 0; w < 16; w++) blk[t][b][32*w +: 32] = $urandom;
        // threads 0 and 1 restart from the initial value after their
        // single-block test vector; the others chain all NB blocks
        if (t < 2 && b == 1) h = ref_iv();
        expd[t][b] = ref_compress(h, blk[t][b]);
        h = expd[t][b];
      end
      msg_idx[t] = 0; ihv_idx[t] = 0; dig_idx[t] = 0; chn_idx[t] = 0;
    end
  end

  function automatic bit first_of_msg(input int t, input int b);
    return (b == 0) || (t < 2 && b == 1);
  endfunction

  // Sources: a new random choice every cycle, made at the negative edge.
  always @(negedge clk) begin
    int k;
    msg_valid <= '0;
    ihv_valid <= '0;
    dig_ready <= S'($urandom) | S'($urandom);
    chn_ready <= S'($urandom) | S'($urandom);
    if (rst_n) begin
      k = $urandom % S;
      if (msg_idx[k] < NB && ($urandom % 4) != 0) begin
        msg_valid[k] <= 1'b1;
        msg_data     <= blk[k][msg_idx[k]];
      end
      // the chaining source follows the message source most of the time
      if (($urandom % 4) == 0) k = $urandom % S;
      if (ihv_idx[k] < NB) begin
        if (first_of_msg(k, ihv_idx[k])) begin
          ihv_valid[k] <= 1'b1;
          ihv_data     <= ref_iv();
        end else if (chain_in[k].size() > 0) begin
          ihv_valid[k] <= 1'b1;
          ihv_data     <= chain_in[k][0];
        end
      end
    end
  end

  // Monitors: sample before the clock edge updates anything.
  always @(posedge clk) if (rst_n) begin
    cycle++;
    for (int t = 0; t < S; t++) begin
      if (msg_valid[t] && msg_ready[t]) msg_idx[t]++;
      if (ihv_valid[t] && ihv_ready[t]) begin
        if (!first_of_msg(t, ihv_idx[t])) void'(chain_in[t].pop_front());
        ihv_idx[t]++;
      end
      if (chn_valid[t] && chn_ready[t]) begin
        chk(chn_idx[t] < NB && chn_data == expd[t][chn_idx[t]],
            $sformatf("thread %0d chain value %0d", t, chn_idx[t]));
        if (chn_idx[t] + 1 < NB && !first_of_msg(t, chn_idx[t] + 1)) chain_in[t].push_back(chn_data);
        chn_idx[t]++;
      end
      if (dig_valid[t] && dig_ready[t]) begin
        chk(dig_idx[t] < NB && dig_data == expd[t][dig_idx[t]],
            $sformatf("thread %0d digest %0d: %h", t, dig_idx[t], dig_data));
        if (dig_idx[t] == 0 && known[t] != '0)
          chk(dig_data == known[t], $sformatf("thread %0d published digest", t));
        dig_idx[t]++;
        dig_total++;
      end
      if (msg_valid[t] != ihv_valid[t]) n_join_wait++;
    end
    if (|(dut.j_v & dut.busy_q))        n_busy_block++;
    if (|(dut.a_v & dut.a_r))           n_path_a++;
    if (|(dut.b_v & dut.b_r))           n_path_b++;
    if (popcount(dut.u_bar.free) > 1)   n_arb++;
    if (|(dut.u_bar.free & ~dut.br_r))  n_backpressure++;
    if (popcount(dut.u_bar.rout) < S && !dut.released && dut.br_v == '0) n_bar_hold++;
    if (dut.released) begin
      n_release++;
      if (round == 2'd3) n_wrap++;
    end
    if (|(dut.x_v & dut.x_r))           n_exit++;
  end

  initial begin
    msg_valid = '0; ihv_valid = '0; dig_ready = '0; chn_ready = '0;
    msg_data = '0; ihv_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (dig_total < S * NB && cycle < 20000) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int t = 0; t < S; t++)
      chk(dig_idx[t] == NB && chn_idx[t] == NB, $sformatf("thread %0d finished %0d blocks", t, dig_idx[t]));
    chk(n_release == 4 * NB, $sformatf("barrier releases %0d, expected %0d", n_release, 4 * NB));
    chk(n_exit == S * NB, $sformatf("exits %0d, expected %0d", n_exit, S * NB));
    chk(n_path_a == S * NB && n_path_b == 3 * S * NB, "merge path counts");
    chk(n_join_wait > 0,    "join never waited");
    chk(n_busy_block > 0,   "admission never refused to a busy thread");
    chk(n_arb > 0,          "no arbitration at the barrier output");
    chk(n_bar_hold > 0,     "barrier never held a thread");
    chk(n_backpressure > 0, "no digest back-pressure");
    chk(n_wrap == NB,       "round counter wraps");
    $display("cycles=%0d blocks=%0d join_wait=%0d busy_block=%0d path_a=%0d path_b=%0d arb=%0d bar_hold=%0d releases=%0d exits=%0d backpressure=%0d wraps=%0d",
             cycle, dig_total, n_join_wait, n_busy_block, n_path_a, n_path_b, n_arb, n_bar_hold,
             n_release, n_exit, n_backpressure, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
