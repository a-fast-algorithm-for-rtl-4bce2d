// Testbench of erasure_estimate_unit at its default parameters (M = 8, V = 4).
//
// For random erasure values delta_i and 0..4 distinct random locators (unused slots 0,
// delta 0), it forms the refined syndromes S_1^(k) = sum_{i>=k} delta_i Q_{i,k-1} and
// the Q terms from their definitions and checks that the unit returns exactly delta.
module tb_erasure_estimate_unit;
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

  logic [M-1:0] s1_i [V];
  logic [M-1:0] q_i [V][V];
  logic [V-1:0] delta_o;

  erasure_estimate_unit dut (.s1_i, .q_i, .delta_o);

  initial begin
    int p [V];
    bit [V-1:0] d;
    int acc, v;
    ref_init(M);
    for (int t = 0; t < NTESTS; t++) begin
      v = $urandom_range(0, V);
      draw_locators(v, p);
      d = (V)'($urandom) & (V)'((1 << v) - 1);
      for (int i = 1; i <= V; i++)
        for (int j = 0; j < V; j++) q_i[i-1][j] = (j <= i - 2) ? (M)'(ref_q(p, i, j)) : '0;
      for (int k = 1; k <= V; k++) begin
        acc = 0;
        for (int i = k; i <= V; i++) if (d[i-1]) acc ^= ref_q(p, i, k - 1);
        s1_i[k-1] = (M)'(acc);
      end
      @(posedge clk);
      check(delta_o == d, $sformatf("delta got %b want %b", delta_o, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
