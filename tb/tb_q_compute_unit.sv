// Testbench of q_compute_unit at its default parameters (M = 8, V = 4).
//
// Draws 1..4 distinct random erasure locators (unused slots 0) and compares every output
// entry with Q_{i,j} = P_i * prod_{m=1..j} (P_i + P_m) evaluated from the definition with
// the reference log tables: the locator itself for j = 0, the products for
// 1 <= j <= i-2, and 0 for every entry the unit does not produce.
module tb_q_compute_unit;
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

  logic [M-1:0] loc_i [V];
  logic [M-1:0] q_o [V][V];

  q_compute_unit dut (.loc_i, .q_o);

  initial begin
    int p [V];
    int want;
    ref_init(M);
    for (int t = 0; t < NTESTS; t++) begin
      draw_locators($urandom_range(1, V), p);
      for (int i = 0; i < V; i++) loc_i[i] = (M)'(p[i]);
      @(posedge clk);
      for (int i = 1; i <= V; i++)
        for (int j = 0; j < V; j++) begin
          want = (i >= 2 && j <= i - 2) ? ref_q(p, i, j) : 0;
          check(int'(q_o[i-1][j]) == want, $sformatf("Q_%0d,%0d got %h want %h", i, j, q_o[i-1][j], want));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
