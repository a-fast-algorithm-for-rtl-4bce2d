// Erasure-only decoder for binary BCH codes of length N = 2^M - 1.
//
// A received word arrives one bit per cycle with a flag marking each erased bit. The
// decoder finds the values of up to V erased bits without building an error-locator
// polynomial, without a root search and without any field inverse:
//   1. syndrome_unit       - S_w = r(alpha^w), w = 1..2T, erased bits read as 0, and the
//                            erasure locators P_{i,0} = alpha^(l_i) in ascending order.
//   2. syndrome_refine_unit- V(V-1)/2 cells give the refined syndromes S_1^(k).
//   3. q_compute_unit      - (V-1)(V-2)/2 cells give the products Q_{i,j}.
//   4. erasure_estimate_unit- delta_V .. delta_1 from S_1^(k) and the Q_{i,j}.
//   5. erasure_check_unit  - re-encodes the estimate into the odd syndromes and raises
//                            alarm_o if they differ from the received ones, which means
//                            a bit outside the erased positions is in error.
// Because erased bits enter the syndromes as 0, delta_i is the corrected value of bit
// l_i itself. Words with fewer than V erasures leave the upper locator slots at 0; those
// slots drop out of every sum and their delta is forced to 0. A word with more than V
// erasures is not decoded and sets ovf_o.
//
// Interface: in_valid/in_bit/in_erase carry r_0 first, no back-pressure, words may be
// back to back. Timing: out_valid pulses two cycles after the last bit of a word is
// accepted (one cycle for the syndrome registers, one for the result registers; steps 2
// to 5 are combinational between them). The outputs hold until the next word completes.
//
// The four units and their cell equations follow the published design (shown there for V = 4,
// minimum distance 5, i.e. T = 2). The bit-serial syndrome unit, the locator capture,
// the handling of fewer or more than V erasures, the field size M = 8 and the
// register placement are choices of this design.
module bch_erasure_decoder
  import bch_erasure_pkg::*;
#(
  parameter int unsigned M = 8,  // field degree, N = 2^M - 1
  parameter int unsigned V = 4,  // erasures corrected per word
  parameter int unsigned T = 2   // error-correcting capability (d_min = 2T+1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_bit,
  input  logic                   in_erase,
  output logic                   out_valid,
  output logic [V-1:0]           delta_o,    // delta_o[i-1]: corrected value of bit l_i
  output logic [V-1:0]           used_o,     // slot i-1 holds an erasure
  output logic [M-1:0]           pos_o [V],  // pos_o[i-1] = l_i
  output logic [$clog2(V+2)-1:0] cnt_o,      // number of erasures (saturates at V)
  output logic                   alarm_o,    // estimate fails the syndrome check
  output logic [T-1:0]           mismatch_o, // mismatch_o[u]: S~_(2u+1) != S_(2u+1)
  output logic                   ovf_o       // more than V erasures, word not decoded
);

  if (V > 2 * T) begin : g_bad_cfg
    $error("V must not exceed 2T: no more than d_min-1 erasures can be corrected");
  end

  typedef logic [M-1:0] elem_t;

  logic                   syn_valid;
  elem_t                  syn   [2*T];
  elem_t                  loc   [V];
  elem_t                  pos   [V];
  logic [$clog2(V+2)-1:0] cnt;
  logic                   ovf;

  elem_t                  syn_v [V];
  elem_t                  s1    [V];
  elem_t                  q     [V][V];
  logic  [V-1:0]          used;
  logic  [V-1:0]          delta_raw;
  logic  [V-1:0]          delta;
  logic  [T-1:0]          mismatch;
  logic                   alarm;

  syndrome_unit #(.M(M), .T(T), .V(V)) u_syndrome (
    .clk, .rst_n, .in_valid, .in_bit, .in_erase,
    .syn_valid_o(syn_valid), .syn_o(syn), .loc_o(loc), .pos_o(pos),
    .cnt_o(cnt), .ovf_o(ovf)
  );

  // The refining unit uses S_1..S_V.
  for (genvar w = 0; w < int'(V); w++) begin : g_synv
    assign syn_v[w] = syn[w];
  end

  syndrome_refine_unit #(.M(M), .V(V)) u_refine (
    .syn_i(syn_v), .loc_i(loc), .s1_o(s1)
  );

  q_compute_unit #(.M(M), .V(V)) u_q (
    .loc_i(loc), .q_o(q)
  );

  erasure_estimate_unit #(.M(M), .V(V)) u_estimate (
    .s1_i(s1), .q_i(q), .delta_o(delta_raw)
  );

  for (genvar i = 0; i < int'(V); i++) begin : g_used
    assign used[i] = (cnt > ($clog2(V+2))'(i));
  end
  assign delta = delta_raw & used;

  erasure_check_unit #(.M(M), .V(V), .T(T)) u_check (
    .syn_i(syn), .loc_i(loc), .delta_i(delta), .mismatch_o(mismatch), .alarm_o(alarm)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      delta_o   <= '0;
      used_o    <= '0;
      cnt_o     <= '0;
      alarm_o   <= 1'b0;
      mismatch_o <= '0;
      ovf_o     <= 1'b0;
      for (int i = 0; i < int'(V); i++) pos_o[i] <= '0;
    end else begin
      out_valid <= syn_valid;
      if (syn_valid) begin
        delta_o <= delta;
        used_o  <= used;
        pos_o   <= pos;
        cnt_o   <= cnt;
        alarm_o <= alarm && !ovf;
        mismatch_o <= mismatch;
        ovf_o   <= ovf;
      end
    end
  end

  // A result is produced exactly once per completed word.
  property p_one_result;
    @(posedge clk) disable iff (!rst_n) syn_valid |=> out_valid;
  endproperty
  a_one_result: assert property (p_one_result);

  // The number of captured erasures never exceeds the slots.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
                                syn_valid |-> cnt <= ($clog2(V+2))'(V));

endmodule
