// ppu: pixel processing unit, the three-stage pipelined thinning decision.
//
// For every 3x3 window it decides whether the centre pixel P1 is deleted in
// the current sub-iteration, using the two-sub-iteration parallel thinning
// rule (Zhang-Suen). A pixel that is 1 is deleted when all of these hold:
//   B: 2 <= number of 1 neighbours <= 6
//   A: exactly one 0->1 transition in the circular sequence P2,P3,..,P9,P2
//   sub-iteration 1: P2&P4&P6 == 0 and P4&P6&P8 == 0
//   sub-iteration 2: P2&P4&P8 == 0 and P2&P6&P8 == 0
// Stage 1 counts B and A and forms the three-input products, stage 2 turns
// them into the condition bits, stage 3 combines them and registers the
// output pixel. A new window is accepted every clock; the result appears
// PPU_LAT = 3 clocks after the window, together with the tag (the pixel
// address) that travelled with it.
//
// The core's overall structure (3x3 window, pipelined decision unit) follows
// the design it implements; the particular thinning rule and the split into
// three stages are this design's choices.
module ppu
  import thin_pkg::*;
#(
  parameter int unsigned TAG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  window_t          in_win,
  input  subiter_e         in_sub,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic             out_pix,    // centre pixel after this sub-iteration
  output logic             out_del,    // centre pixel was deleted
  output logic [TAG_W-1:0] out_tag
);

  // ---- stage 1: counts and products -------------------------------------
  logic [7:0] nb;     // P2..P9 at bits 0..7
  logic [7:0] trans;  // 0->1 transitions P(k) -> P(k+1)
  logic [3:0] b_sum, a_sum;

  always_comb begin
    nb = {in_win.nw, in_win.w, in_win.sw, in_win.s,
          in_win.se, in_win.e, in_win.ne, in_win.n};
    for (int i = 0; i < 8; i++) trans[i] = ~nb[i] & nb[(i + 1) % 8];
    b_sum = '0;
    a_sum = '0;
    for (int i = 0; i < 8; i++) begin
      b_sum = b_sum + 4'(nb[i]);
      a_sum = a_sum + 4'(trans[i]);
    end
  end

  logic             s1_valid, s1_c;
  subiter_e         s1_sub;
  logic [TAG_W-1:0] s1_tag;
  logic [3:0]       s1_b, s1_a;
  logic             s1_p246, s1_p468, s1_p248, s1_p268;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_c    <= in_win.c;
    s1_sub  <= in_sub;
    s1_tag  <= in_tag;
    s1_b    <= b_sum;
    s1_a    <= a_sum;
    s1_p246 <= in_win.n & in_win.e & in_win.s;
    s1_p468 <= in_win.e & in_win.s & in_win.w;
    s1_p248 <= in_win.n & in_win.e & in_win.w;
    s1_p268 <= in_win.n & in_win.s & in_win.w;
  end

  // ---- stage 2: condition bits -------------------------------------------
  logic             s2_valid, s2_c, s2_cb, s2_ca, s2_cd;
  logic [TAG_W-1:0] s2_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    s2_c   <= s1_c;
    s2_tag <= s1_tag;
    s2_cb  <= (s1_b >= 4'd2) && (s1_b <= 4'd6);
    s2_ca  <= (s1_a == 4'd1);
    s2_cd  <= (s1_sub == SUB_1) ? !(s1_p246 || s1_p468)
                                : !(s1_p248 || s1_p268);
  end

  // ---- stage 3: decision -------------------------------------------------
  logic del;
  assign del = s2_c & s2_cb & s2_ca & s2_cd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s2_valid;
  end

  always_ff @(posedge clk) begin
    out_pix <= s2_c & ~del;
    out_del <= del;
    out_tag <= s2_tag;
  end

endmodule
