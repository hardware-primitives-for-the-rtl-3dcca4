// Testbench of m_merge: one thread valid on path A or on path B (never both
// paths), random readies and data; checks output valid, per-path readies and
// that the shared multiplexer forwards the data of the active path.
module tb_m_merge;
  localparam int S = 4, W = 24;
  logic clk = 0, rst_n = 0;
  logic [S-1:0] va, vb, ra, rb, v, r;
  logic [W-1:0] da, db, d;
  int checks = 0, failures = 0, seen_a = 0, seen_b = 0;

  m_merge #(.S(S), .W(W)) dut (.clk, .rst_n, .va_in(va), .ra_out(ra), .da_in(da),
                               .vb_in(vb), .rb_out(rb), .db_in(db), .v_out(v), .r_in(r), .d_out(d));

  always #5 clk = ~clk;

  initial begin
    va = '0; vb = '0; r = '0; da = '0; db = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int k, p;
      @(negedge clk);
      k  = $urandom % (S + 1);
      p  = $urandom % 2;
      va = (k < S && p == 0) ? S'(1) << k : '0;
      vb = (k < S && p == 1) ? S'(1) << k : '0;
      r  = S'($urandom);
      da = W'($urandom);
      db = W'($urandom);
      #1;
      checks++;
      if (v !== (va | vb) || ra !== r || rb !== r ||
          (|va && d !== da) || (|vb && d !== db)) begin
        failures++;
        $display("FAIL va=%b vb=%b r=%b -> v=%b ra=%b rb=%b d=%h", va, vb, r, v, ra, rb, d);
      end
      if (|va) seen_a++;
      if (|vb) seen_b++;
    end
    checks++;
    if (seen_a == 0 || seen_b == 0) begin failures++; $display("FAIL a path never used"); end
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
