// tb_thinning_algo: end-to-end testbench of the thinning core on small
// frames (24 x 16). Each job loads a frame with random gaps in
// pix_in_valid, lets the core thin it, and compares the streamed-out
// skeleton and the iteration count with the reference model. It checks the
// clock count from the last input pixel to done against
// 2 * iterations * (W*H + W + 8) + W*H + 4, that the output is a
// contiguous burst of W*H pixels, and that done is a single pulse.
// Mechanism counters: input stalls (in_ready or pix_in_valid low during a
// load), sub-iterations that delete pixels (seen in the reference), jobs
// needing several iterations, jobs that end after one iteration (empty or
// already thin frames), and object pixels on the frame border. Each must
// occur at least once.
module tb_thinning_algo;
  import thin_pkg::*;
  import thin_ref_pkg::*;

  localparam int W = 24, H = 16, N = W * H;
  logic clk = 0, rst_n = 0, start = 0;
  logic pix_in = 0, pix_in_valid = 0, in_ready, pix_out, pix_out_valid, busy, done;
  logic [7:0] iterations;

  thinning_algo #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_multi = 0, n_single = 0, n_border = 0, n_del_sub1 = 0, n_del_sub2 = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_job(bit img[], int gap_pct);
    bit expd[];
    bit got[$];
    int exp_iter, i;
    longint t_last, t_done;
    expd = img;
    // Count reference deletions per sub-iteration for coverage.
    begin
      bit tmp[];
      int d1, d2;
      tmp = img;
      exp_iter = 0;
      do begin
        d1 = zs_pass(tmp, W, H, 1'b0);
        d2 = zs_pass(tmp, W, H, 1'b1);
        if (d1 > 0) n_del_sub1++;
        if (d2 > 0) n_del_sub2++;
        exp_iter++;
      end while (d1 + d2 != 0);
    end
    check(zs_thin(expd, W, H) == exp_iter, "reference model consistent");
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        if (img[r * W + c] && (r == 0 || c == 0 || r == H - 1 || c == W - 1)) n_border++;
    if (exp_iter > 1) n_multi++; else n_single++;

    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    i = 0;
    while (i < N) begin
      pix_in_valid = ($urandom_range(0, 99) >= gap_pct);
      pix_in = img[i];
      @(posedge clk);
      if (pix_in_valid && in_ready) begin
        i++;
        t_last = cyc;
      end else n_stall++;
      @(negedge clk);
    end
    pix_in_valid = 0;
    fork
      begin
        while (!done) begin
          @(posedge clk);
          if (pix_out_valid) got.push_back(pix_out);
        end
        t_done = cyc;
      end
    join
    @(posedge clk);
    #1;
    check(!done && !busy, "done is one clock, core idle afterwards");
    check(got.size() == N, $sformatf("%0d output pixels, expected %0d", got.size(), N));
    begin
      int bad = 0;
      for (int k = 0; k < N && k < got.size(); k++) if (got[k] !== expd[k]) bad++;
      check(bad == 0, $sformatf("%0d output pixels differ from the reference", bad));
    end
    check(int'(iterations) == exp_iter, $sformatf("iterations %0d expected %0d", iterations, exp_iter));
    check(t_done - t_last == longint'(2 * exp_iter * (N + W + 8) + N + 4),
          $sformatf("clocks last input->done %0d expected %0d", t_done - t_last,
                    2 * exp_iter * (N + W + 8) + N + 4));
  endtask

  initial begin
    bit img[];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(!busy && !in_ready, "idle after reset");
    // Empty frame: one iteration, nothing deleted.
    img = new[N];
    foreach (img[k]) img[k] = 1'b0;
    run_job(img, 0);
    // Full frame: every pixel on, border included.
    foreach (img[k]) img[k] = 1'b1;
    run_job(img, 20);
    // Random vein-like frames.
    for (int j = 0; j < 6; j++) begin
      gen_veins(img, W, H, $urandom_range(1, 3), $urandom_range(0, 2));
      run_job(img, (j % 2) ? 30 : 0);
    end
    // A skeleton is already thin: thinning it again changes nothing.
    gen_veins(img, W, H, 2, 1);
    void'(zs_thin(img, W, H));
    run_job(img, 10);
    $display("stalls %0d, deleting sub1 %0d, deleting sub2 %0d, multi-iteration jobs %0d, single %0d, border pixels %0d",
             n_stall, n_del_sub1, n_del_sub2, n_multi, n_single, n_border);
    check(n_stall > 0, "input stall happened");
    check(n_del_sub1 > 0 && n_del_sub2 > 0, "both sub-iterations deleted pixels");
    check(n_multi > 0 && n_single > 0, "multi- and single-iteration jobs");
    check(n_border > 0, "object pixels on the border");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
