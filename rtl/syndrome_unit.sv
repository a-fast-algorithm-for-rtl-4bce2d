// Syndrome computing unit with erasure-locator capture.
//
// Receives one code bit per accepted cycle, r_0 first and r_{N-1} last, N = 2^M - 1,
// together with a flag that marks the bit as erased. It evaluates the 2T syndromes
// S_w = r(alpha^w), w = 1..2T, with every erased bit read as 0, so that the syndromes
// depend only on the unknown values of the erased bits (and on any unflagged errors).
// Each syndrome has a power register p_w = alpha^(w*j) for the current bit index j,
// stepped by a constant multiply by alpha^w; a 1 bit adds p_w into the accumulator.
// p_1 = alpha^j is also the erasure locator: the first V erased positions are captured
// in arrival order, which is ascending order l_1 < l_2 < ..., together with their
// indices l_i. Unused locator slots stay 0 (see the decoder for why that is harmless).
// More than V erasures set ovf_o.
//
// Interface: in_valid/in_bit/in_erase, no back-pressure; a word may have idle cycles
// inside it and the next word may start on the cycle after the last bit. One cycle after
// the last bit is accepted, syn_valid_o pulses for one cycle and syn_o, loc_o, pos_o,
// cnt_o and ovf_o hold the word's results until the next word ends.
//
// The published design defines the syndromes (S_w = r(alpha^w)) but shows no circuit for this
// unit; the bit-serial evaluation order, zero-filling of erased bits and the locator
// capture are choices of this design.
module syndrome_unit
  import bch_erasure_pkg::*;
#(
  parameter int unsigned M = 8,  // field degree, code length N = 2^M - 1
  parameter int unsigned T = 2,  // error-correcting capability, 2T syndromes
  parameter int unsigned V = 4   // erasure locator slots
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_bit,
  input  logic                   in_erase,
  output logic                   syn_valid_o,
  output logic [M-1:0]           syn_o [2*T],  // syn_o[w-1] = S_w
  output logic [M-1:0]           loc_o [V],    // loc_o[i-1] = alpha^(l_i), 0 if unused
  output logic [M-1:0]           pos_o [V],    // pos_o[i-1] = l_i, 0 if unused
  output logic [$clog2(V+2)-1:0] cnt_o,        // erasures captured (saturates at V)
  output logic                   ovf_o         // more than V erasures in the word
);

  localparam int unsigned NW = 2 * T;
  localparam logic [M-1:0] LAST = {M{1'b1}} - 1'b1;  // index N-1

  typedef logic [M-1:0] elem_t;

  elem_t                    idx_q;
  elem_t                    pw_q  [NW];
  elem_t                    acc_q [NW];
  elem_t                    loc_q [V];
  elem_t                    pos_q [V];
  logic [$clog2(V+2)-1:0]   cnt_q;
  logic                     ovf_q;

  elem_t                    pw_d  [NW];
  elem_t                    acc_d [NW];
  elem_t                    loc_d [V];
  elem_t                    pos_d [V];
  logic [$clog2(V+2)-1:0]   cnt_d;
  logic                     ovf_d;
  logic                     last;

  assign last = in_valid && (idx_q == LAST);

  // Values after the current bit has been taken in.
  always_comb begin
    for (int w = 0; w < int'(NW); w++) begin
      pw_d[w]  = elem_t'(gf_mul(gf_word_t'(pw_q[w]), gf_alpha_pow(w + 1, M), M));
      acc_d[w] = acc_q[w] ^ ((in_bit && !in_erase) ? pw_q[w] : '0);
    end
    loc_d = loc_q;
    pos_d = pos_q;
    cnt_d = cnt_q;
    ovf_d = ovf_q;
    if (in_erase) begin
      if (cnt_q < ($clog2(V+2))'(V)) begin
        for (int i = 0; i < int'(V); i++) begin
          if (cnt_q == ($clog2(V+2))'(i)) begin
            loc_d[i] = pw_q[0];
            pos_d[i] = idx_q;
          end
        end
        cnt_d = cnt_q + 1'b1;
      end else begin
        ovf_d = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q <= '0;
      cnt_q <= '0;
      ovf_q <= 1'b0;
      for (int w = 0; w < int'(NW); w++) begin
        pw_q[w]  <= elem_t'(1);
        acc_q[w] <= '0;
      end
      for (int i = 0; i < int'(V); i++) begin
        loc_q[i] <= '0;
        pos_q[i] <= '0;
      end
    end else if (in_valid) begin
      if (last) begin
        // Start the next word from scratch.
        idx_q <= '0;
        cnt_q <= '0;
        ovf_q <= 1'b0;
        for (int w = 0; w < int'(NW); w++) begin
          pw_q[w]  <= elem_t'(1);
          acc_q[w] <= '0;
        end
        for (int i = 0; i < int'(V); i++) begin
          loc_q[i] <= '0;
          pos_q[i] <= '0;
        end
      end else begin
        idx_q <= idx_q + 1'b1;
        pw_q  <= pw_d;
        acc_q <= acc_d;
        loc_q <= loc_d;
        pos_q <= pos_d;
        cnt_q <= cnt_d;
        ovf_q <= ovf_d;
      end
    end
  end

  // Result registers, loaded with the completed word.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syn_valid_o <= 1'b0;
      cnt_o       <= '0;
      ovf_o       <= 1'b0;
      for (int w = 0; w < int'(NW); w++) syn_o[w] <= '0;
      for (int i = 0; i < int'(V); i++) begin
        loc_o[i] <= '0;
        pos_o[i] <= '0;
      end
    end else begin
      syn_valid_o <= last;
      if (last) begin
        syn_o <= acc_d;
        loc_o <= loc_d;
        pos_o <= pos_d;
        cnt_o <= cnt_d;
        ovf_o <= ovf_d;
      end
    end
  end

endmodule
