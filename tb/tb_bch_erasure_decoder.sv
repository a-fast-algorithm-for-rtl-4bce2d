// End-to-end testbench of bch_erasure_decoder at its default parameters
// (M = 8: length-255 words, V = 4 erasures, T = 2).
//
// Each word is a random codeword u(x)g(x) of the double-error-correcting BCH code
// (g(x) built by the reference package), sent r_0 first with 0..6 erased positions,
// random garbage in the erased bits, and in about one word in four also one or two
// bit errors at positions that are not flagged. The expected result is found by brute
// force, independently of the decoder's algorithm: every filling of the erased bits is
// tried, and a filling that makes the word a codeword (all odd syndromes zero) must be
// what the decoder returns, with no alarm; if none does, the alarm must be raised. Words
// with more than four erasures must set the overflow flag. Counts, positions and the
// two-cycle latency from the last bit to out_valid are checked for every word.
// Idle cycles inside words and back-to-back words are both exercised, and each
// mechanism (0..4 erasures, overflow, alarm, gaps, back-to-back) must occur.
module tb_bch_erasure_decoder;
  import tb_gf_ref_pkg::*;

  localparam int M = 8;
  localparam int V = 4;
  localparam int T = 2;
  localparam int N = (1 << M) - 1;
  localparam int NWORDS = 400;
  localparam int CW = $clog2(V + 2);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0, in_bit = 1'b0, in_erase = 1'b0;
  logic          out_valid;
  logic [V-1:0]  delta_o, used_o;
  logic [M-1:0]  pos_o [V];
  logic [CW-1:0] cnt_o;
  logic          alarm_o, ovf_o;
  logic [T-1:0]  mismatch_o;

  bch_erasure_decoder dut (
    .clk, .rst_n, .in_valid, .in_bit, .in_erase,
    .out_valid, .delta_o, .used_o, .pos_o, .cnt_o, .alarm_o, .mismatch_o, .ovf_o
  );

  always #5 clk = ~clk;

  typedef struct {
    int       cnt;
    bit       ovf;
    int       pos [V];
    bit       solvable;
    bit [V-1:0] delta;
    longint   last_cycle;
  } exp_t;

  exp_t   expq[$];
  int     checks = 0, failures = 0;
  longint cycle = 0;
  int     n_v [0:V];
  int     n_ovf = 0, n_alarm = 0, n_gap = 0, n_b2b = 0, n_results = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Monitor: compare each result with the oldest expectation.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      n_results++;
      if (expq.size() == 0) begin
        check(0, "result without a word");
      end else begin
        e = expq.pop_front();
        check(cycle == e.last_cycle + 2, $sformatf("latency %0d", cycle - e.last_cycle));
        check(ovf_o == e.ovf, "overflow flag");
        check(int'(cnt_o) == (e.ovf ? V : e.cnt), "erasure count");
        for (int i = 0; i < V; i++) begin
          if (i < e.cnt) check(int'(pos_o[i]) == e.pos[i], $sformatf("position %0d", i));
          check(used_o[i] == (i < e.cnt), "used mask");
        end
        if (!e.ovf) begin
          if (e.solvable) begin
            check(alarm_o == 1'b0, "false alarm");
            check(delta_o == e.delta,
                  $sformatf("delta got %b want %b (cnt %0d)", delta_o, e.delta, e.cnt));
          end else begin
            check(alarm_o == 1'b1, "missing alarm");
            if (alarm_o) n_alarm++;
          end
        end else begin
          check(alarm_o == 1'b0, "alarm on overflow word");
        end
      end
    end
  end

  bit cw   [0:N-1];
  bit era  [0:N-1];
  bit err  [0:N-1];

  task automatic make_word(output exp_t e, output int v);
    bit u [0:N-1];
    int k, nerr, p, s_zero [T], s, f_ok;
    k = N - int'(gdeg);
    for (int j = 0; j < N; j++) begin
      cw[j] = 0; era[j] = 0; err[j] = 0;
    end
    for (int j = 0; j < k; j++) u[j] = 1'($urandom);
    for (int j = 0; j < k; j++)
      if (u[j]) for (int d = 0; d <= int'(gdeg); d++) cw[j+d] ^= gpoly[d];
    v = $urandom_range(0, V + 2);
    for (int i = 0; i < v; i++) begin
      do p = $urandom_range(0, N - 1); while (era[p]);
      era[p] = 1;
    end
    nerr = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 2) : 0;
    for (int i = 0; i < nerr; i++) begin
      do p = $urandom_range(0, N - 1); while (era[p] || err[p]);
      err[p] = 1;
    end
    e.cnt = (v > V) ? V : v;
    e.ovf = (v > V);
    p = 0;
    for (int j = 0; j < N; j++) if (era[j]) begin
      if (p < V) e.pos[p] = j;
      p++;
    end
    for (int i = p; i < V; i++) e.pos[i] = 0;
    // Odd syndromes of the word with erased bits set to 0.
    for (int u2 = 0; u2 < T; u2++) begin
      s_zero[u2] = 0;
      for (int j = 0; j < N; j++)
        if (!era[j] && (cw[j] ^ err[j])) s_zero[u2] ^= ref_alpha(longint'(2*u2+1) * j);
    end
    e.solvable = 0;
    e.delta = '0;
    if (!e.ovf) begin
      for (int f = 0; f < (1 << v); f++) begin
        f_ok = 1;
        for (int u2 = 0; u2 < T; u2++) begin
          s = s_zero[u2];
          for (int i = 0; i < v; i++)
            if (f[i]) s ^= ref_alpha(longint'(2*u2+1) * e.pos[i]);
          if (s != 0) f_ok = 0;
        end
        if (f_ok) begin
          e.solvable = 1;
          e.delta = (V)'(f);
        end
      end
      // Without unflagged errors the true codeword bits are the only solution.
      if (nerr == 0) begin
        bit [V-1:0] truth = '0;
        for (int i = 0; i < v; i++) truth[i] = cw[e.pos[i]];
        check(e.solvable && e.delta == truth, "reference brute force");
      end
    end
  endtask

  initial begin
    exp_t e;
    int v;
    bit  gap_word;
    for (int i = 0; i <= V; i++) n_v[i] = 0;
    ref_init(M);
    ref_genpoly(T);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      make_word(e, v);
      if (v > V) n_ovf++; else n_v[v]++;
      gap_word = ($urandom_range(0, 3) == 0);
      if (gap_word) n_gap++;
      for (int j = 0; j < N; j++) begin
        if (gap_word && $urandom_range(0, 15) == 0) begin
          in_valid <= 1'b0;
          in_bit   <= 1'($urandom);
          in_erase <= 1'($urandom);
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_erase <= era[j];
        in_bit   <= era[j] ? 1'($urandom) : (cw[j] ^ err[j]);
        @(posedge clk);
      end
      e.last_cycle = cycle;  // edge that accepted the last bit
      expq.push_back(e);
      if ($urandom_range(0, 2) == 0) begin
        in_valid <= 1'b0;
        repeat ($urandom_range(1, 3)) @(posedge clk);
      end else if (w > 0) begin
        n_b2b++;
      end
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    check(expq.size() == 0, "every word produced one result");
    check(n_results == NWORDS, "result count");
    for (int i = 0; i <= V; i++) check(n_v[i] > 0, $sformatf("words with %0d erasures", i));
    check(n_ovf > 0, "overflow words");
    check(n_alarm > 0, "alarm raised");
    check(n_gap > 0, "idle cycles inside words");
    check(n_b2b > 0, "back-to-back words");
    $display("words=%0d v0..4=%0d/%0d/%0d/%0d/%0d overflow=%0d alarm=%0d gap=%0d b2b=%0d",
             n_results, n_v[0], n_v[1], n_v[2], n_v[3], n_v[4], n_ovf, n_alarm, n_gap, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NWORDS * (N + 40) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
