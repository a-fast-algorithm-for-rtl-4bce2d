// Testbench of syndrome_unit at its default parameters (M = 8, T = 2, V = 4).
//
// Sends random length-255 words with 0..6 randomly placed erasures and occasional idle
// cycles. For every word it checks the four syndromes against r(alpha^w) computed with
// the reference log tables (erased bits counted as 0), the captured locators alpha^(l_i)
// and indices l_i of the first four erasures, the erasure count, the overflow flag, and
// that syn_valid_o rises one edge after the edge that accepts the last bit.
module tb_syndrome_unit;
  import tb_gf_ref_pkg::*;

  localparam int M = 8, T = 2, V = 4;
  localparam int N = (1 << M) - 1;
  localparam int CW = $clog2(V + 2);
  localparam int NWORDS = 60;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid = 1'b0, in_bit = 1'b0, in_erase = 1'b0;
  logic          syn_valid_o;
  logic [M-1:0]  syn_o [2*T];
  logic [M-1:0]  loc_o [V];
  logic [M-1:0]  pos_o [V];
  logic [CW-1:0] cnt_o;
  logic          ovf_o;

  syndrome_unit dut (.clk, .rst_n, .in_valid, .in_bit, .in_erase, .syn_valid_o, .syn_o,
                     .loc_o, .pos_o, .cnt_o, .ovf_o);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit r [0:N-1];
    bit era [0:N-1];
    int v, p, s, cnt, pos [V];
    ref_init(M);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int w = 0; w < NWORDS; w++) begin
      for (int j = 0; j < N; j++) begin
        r[j] = 1'($urandom);
        era[j] = 0;
      end
      v = $urandom_range(0, V + 2);
      for (int i = 0; i < v; i++) begin
        do p = $urandom_range(0, N - 1); while (era[p]);
        era[p] = 1;
      end
      cnt = 0;
      for (int j = 0; j < N; j++) if (era[j]) begin
        if (cnt < V) pos[cnt] = j;
        cnt++;
      end
      for (int j = 0; j < N; j++) begin
        if ($urandom_range(0, 31) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_bit   <= r[j];
        in_erase <= era[j];
        @(posedge clk);
        check(syn_valid_o == 1'b0 || j == 0, "early syn_valid");
      end
      in_valid <= 1'b0;
      @(posedge clk);
      check(syn_valid_o == 1'b1, "syn_valid one cycle after the last bit");
      for (int u = 1; u <= 2 * T; u++) begin
        s = 0;
        for (int j = 0; j < N; j++) if (r[j] && !era[j]) s ^= ref_alpha(longint'(u) * j);
        check(int'(syn_o[u-1]) == s, $sformatf("S_%0d got %h want %h", u, syn_o[u-1], s));
      end
      check(int'(cnt_o) == ((cnt > V) ? V : cnt), "count");
      check(ovf_o == (cnt > V), "overflow");
      for (int i = 0; i < V; i++) begin
        if (i < cnt) begin
          check(int'(pos_o[i]) == pos[i], "position");
          check(int'(loc_o[i]) == ref_alpha(pos[i]), "locator");
        end else begin
          check(loc_o[i] == '0 && pos_o[i] == '0, "unused slot is 0");
        end
      end
      @(posedge clk);
      check(syn_valid_o == 1'b0, "syn_valid is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NWORDS * (N + 40) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
