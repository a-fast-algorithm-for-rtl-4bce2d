// Testbench of erasure_check_unit at its default parameters (M = 8, V = 4, T = 2).
//
// Builds odd syndromes S_1, S_3 that agree with random erasure values and locators
// (even syndromes random, they are not used) and expects no alarm; then corrupts one odd
// syndrome, or flips one estimated bit of a used slot, and expects the alarm with the
// right mismatch bits, all computed with the reference tables.
module tb_erasure_check_unit;
  import tb_gf_ref_pkg::*;

  localparam int M = 8, V = 4, T = 2;
  localparam int N = (1 << M) - 1;
  localparam int NTESTS = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // v distinct random locators alpha^l in slots 0..v-1, 0 in the remaining slots.
  task automatic draw_locators(input int v, output int p [V]);
    int l [V];
    bit dup;
    for (int i = 0; i < V; i++) p[i] = 0;
    for (int i = 0; i < v; i++) begin
      do begin
        l[i] = $urandom_range(0, N - 1);
        dup = 0;
        for (int j = 0; j < i; j++) if (l[j] == l[i]) dup = 1;
      end while (dup);
      p[i] = ref_alpha(l[i]);
    end
  endtask

  // Q_{i,j} (1-based i) = P_i * prod_{m=1..j} (P_i + P_m), straight from the definition.
  function automatic int ref_q(input int p [V], input int i, input int j);
    int q = p[i-1];
    for (int m = 1; m <= j; m++) q = ref_mul(q, p[i-1] ^ p[m-1]);
    return q;
  endfunction

  function automatic int ref_pow(input int a, input int e);
    int r = 1;
    for (int k = 0; k < e; k++) r = ref_mul(r, a);
    return r;
  endfunction

  initial begin
    repeat (NTESTS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [M-1:0] syn_i [2*T];
  logic [M-1:0] loc_i [V];
  logic [V-1:0] delta_i;
  logic [T-1:0] mismatch_o;
  logic         alarm_o;

  erasure_check_unit dut (.syn_i, .loc_i, .delta_i, .mismatch_o, .alarm_o);

  initial begin
    int p [V];
    bit [V-1:0] d, dd;
    int s [2*T];
    int v, mode, u, sw;
    bit [T-1:0] want;
    ref_init(M);
    for (int t = 0; t < NTESTS; t++) begin
      v = $urandom_range(1, V);
      draw_locators(v, p);
      d = (V)'($urandom) & (V)'((1 << v) - 1);
      for (int w = 1; w <= 2 * T; w++) begin
        s[w-1] = 0;
        if (w % 2 == 1) begin
          for (int i = 0; i < V; i++) if (d[i]) s[w-1] ^= ref_pow(p[i], w);
        end else s[w-1] = $urandom_range(0, N);
      end
      mode = $urandom_range(0, 2);
      dd = d;
      if (mode == 1) begin
        u = $urandom_range(0, T - 1);
        s[2*u] ^= $urandom_range(1, N);
      end else if (mode == 2) begin
        dd[$urandom_range(0, v - 1)] ^= 1'b1;
      end
      for (int w = 0; w < 2 * T; w++) syn_i[w] = (M)'(s[w]);
      for (int i = 0; i < V; i++) loc_i[i] = (M)'(p[i]);
      delta_i = dd;
      @(posedge clk);
      for (int uu = 0; uu < T; uu++) begin
        sw = 0;
        for (int i = 0; i < V; i++) if (dd[i]) sw ^= ref_pow(p[i], 2 * uu + 1);
        want[uu] = (sw != s[2*uu]);
      end
      check(mismatch_o == want, $sformatf("mismatch got %b want %b", mismatch_o, want));
      check(alarm_o == (want != 0), "alarm");
      if (mode != 0) check(alarm_o, "corrupted estimate must alarm");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
