// tb_ppu: self-checking testbench of the pixel processing unit.
// Drives random windows (biased towards set pixels so that all conditions
// occur) with random gaps and both sub-iterations, and compares the
// decision and tag PPU_LAT clocks later against a scoreboard computed with
// a separate formulation of the rule (neighbour list P2..P9 in a loop).
module tb_ppu;
  import thin_pkg::*;

  localparam int TAG_W = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  window_t in_win;
  subiter_e in_sub;
  logic [TAG_W-1:0] in_tag;
  logic out_valid, out_pix, out_del;
  logic [TAG_W-1:0] out_tag;

  ppu #(.TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_del = 0, n_keep_fg = 0;

  function automatic bit ref_del(window_t w, bit sub2);
    bit p[10];
    int b, a;
    p[2] = w.n; p[3] = w.ne; p[4] = w.e; p[5] = w.se;
    p[6] = w.s; p[7] = w.sw; p[8] = w.w; p[9] = w.nw;
    b = 0; a = 0;
    for (int k = 2; k <= 9; k++) begin
      b += int'(p[k]);
      if (!p[k] && p[(k == 9) ? 2 : k + 1]) a++;
    end
    if (!w.c || b < 2 || b > 6 || a != 1) return 0;
    if (!sub2) return !(p[2] & p[4] & p[6]) && !(p[4] & p[6] & p[8]);
    return !(p[2] & p[4] & p[8]) && !(p[2] & p[6] & p[8]);
  endfunction

  // Expected results, indexed by the cycle they must appear in.
  bit exp_valid [int];
  bit exp_del   [int];
  logic [TAG_W-1:0] exp_tag [int];
  bit exp_c [int];
  int cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      bit ev;
      ev = exp_valid.exists(cyc) ? exp_valid[cyc] : 1'b0;
      checks++;
      if (out_valid !== ev) begin
        failures++;
        $display("cycle %0d: out_valid %0b expected %0b", cyc, out_valid, ev);
      end else if (ev) begin
        checks++;
        if (out_del !== exp_del[cyc] || out_pix !== (exp_c[cyc] & ~exp_del[cyc]) ||
            out_tag !== exp_tag[cyc]) begin
          failures++;
          $display("cycle %0d: del %0b pix %0b tag %0d, expected del %0b tag %0d",
                   cyc, out_del, out_pix, out_tag, exp_del[cyc], exp_tag[cyc]);
        end
        if (exp_del[cyc]) n_del++;
        else if (exp_c[cyc]) n_keep_fg++;
      end
      if (in_valid) begin
        exp_valid[cyc + PPU_LAT] = 1'b1;
        exp_del[cyc + PPU_LAT]   = ref_del(in_win, in_sub == SUB_2);
        exp_c[cyc + PPU_LAT]     = in_win.c;
        exp_tag[cyc + PPU_LAT]   = in_tag;
      end
    end
  end

  initial begin
    in_valid = 0; in_win = '0; in_sub = SUB_1; in_tag = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      in_win   = window_t'($urandom) | window_t'($urandom);  // about 3/4 ones
      if ($urandom_range(0, 3) == 0) in_win = window_t'($urandom);
      in_win.c = ($urandom_range(0, 7) != 0);
      in_sub   = subiter_e'($urandom_range(0, 1));
      in_tag   = TAG_W'($urandom);
    end
    @(negedge clk) in_valid = 0;
    repeat (PPU_LAT + 2) @(posedge clk);
    if (n_del == 0 || n_keep_fg == 0) begin
      failures++;
      $display("coverage: deletions %0d, kept object pixels %0d", n_del, n_keep_fg);
    end
    $display("deleted %0d, kept object pixels %0d", n_del, n_keep_fg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
