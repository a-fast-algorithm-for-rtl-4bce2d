// Testbench of syndrome_refine_unit at its default parameters (M = 8, V = 4).
//
// Builds syndromes S_w = sum_i delta_i P_i^w from random erasure values delta_i and
// 0..4 distinct random locators P_i, and checks the outputs against the closed form
// S_1^(k) = sum_{i>=k} delta_i Q_{i,k-1} with Q from its definition. A second set of
// tests feeds fully random syndromes and locators and checks the row recursion
// S_w^(k) = S_{w+1}^(k-1) + S_w^(k-1) P_{k-1} evaluated with the reference tables.
module tb_syndrome_refine_unit;
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

  logic [M-1:0] syn_i [V];
  logic [M-1:0] loc_i [V];
  logic [M-1:0] s1_o [V];

  syndrome_refine_unit dut (.syn_i, .loc_i, .s1_o);

  initial begin
    int p [V];
    int s [V][V];
    bit [V-1:0] d;
    int want, v;
    ref_init(M);
    for (int t = 0; t < NTESTS; t++) begin
      v = $urandom_range(0, V);
      draw_locators(v, p);
      d = (V)'($urandom) & (V)'((1 << v) - 1);
      if (t % 2 == 0) begin
        for (int w = 1; w <= V; w++) begin
          want = 0;
          for (int i = 0; i < V; i++) if (d[i]) want ^= ref_pow(p[i], w);
          syn_i[w-1] = (M)'(want);
        end
      end else begin
        for (int i = 0; i < V; i++) begin
          p[i] = $urandom_range(0, N);
          syn_i[i] = (M)'($urandom_range(0, N));
        end
      end
      for (int i = 0; i < V; i++) loc_i[i] = (M)'(p[i]);
      @(posedge clk);
      if (t % 2 == 0) begin
        for (int k = 1; k <= V; k++) begin
          want = 0;
          for (int i = k; i <= V; i++) if (d[i-1]) want ^= ref_q(p, i, k - 1);
          check(int'(s1_o[k-1]) == want, $sformatf("S_1^(%0d) got %h want %h", k, s1_o[k-1], want));
        end
      end else begin
        for (int w = 0; w < V; w++) s[0][w] = int'(syn_i[w]);
        for (int k = 1; k < V; k++)
          for (int w = 0; w < V - k; w++) s[k][w] = s[k-1][w+1] ^ ref_mul(s[k-1][w], p[k-1]);
        for (int k = 0; k < V; k++)
          check(int'(s1_o[k]) == s[k][0], $sformatf("row %0d recursion", k + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
