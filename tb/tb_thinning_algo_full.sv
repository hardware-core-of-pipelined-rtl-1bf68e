// tb_thinning_algo_full: complete jobs on the full 240 x 160 frame with the
// core at its default parameters. Three synthetic finger-vein frames of
// different density (thick random walks across the image, some with filled
// patches) are thinned back to back, as three input images would be. For
// each, checks the streamed-out skeleton pixel by pixel and the iteration
// count against the reference model, and the clock count from the last
// input pixel to done: 2 * iterations * (W*H + W + 8) + W*H + 4.
module tb_thinning_algo_full;
  import thin_pkg::*;
  import thin_ref_pkg::*;

  localparam int W = IMG_W, H = IMG_H, N = W * H;
  logic clk = 0, rst_n = 0, start = 0;
  logic pix_in = 0, pix_in_valid = 0, in_ready, pix_out, pix_out_valid, busy, done;
  logic [7:0] iterations;

  thinning_algo dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_job(int n_veins, int n_blobs);
    bit img[], expd[];
    bit got[$];
    int exp_iter, i, ones;
    longint t_last, t_done, t_exp;
    gen_veins(img, W, H, n_veins, n_blobs);
    expd = img;
    exp_iter = zs_thin(expd, W, H);
    ones = 0;
    foreach (img[k]) ones += int'(img[k]);
    $display("frame %0dx%0d, %0d object pixels, reference needs %0d iterations",
             W, H, ones, exp_iter);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    i = 0;
    while (i < N) begin
      pix_in_valid = 1;
      pix_in = img[i];
      @(posedge clk);
      if (in_ready) begin
        i++;
        t_last = cyc;
      end
      @(negedge clk);
    end
    pix_in_valid = 0;
    while (!done) begin
      @(posedge clk);
      if (pix_out_valid) got.push_back(pix_out);
    end
    t_done = cyc;
    check(got.size() == N, $sformatf("%0d output pixels, expected %0d", got.size(), N));
    begin
      int bad = 0, left = 0;
      for (int k = 0; k < N && k < got.size(); k++) begin
        if (got[k] !== expd[k]) bad++;
        left += int'(got[k]);
      end
      check(bad == 0, $sformatf("%0d output pixels differ from the reference", bad));
      $display("skeleton keeps %0d of %0d object pixels", left, ones);
    end
    check(int'(iterations) == exp_iter, $sformatf("iterations %0d expected %0d", iterations, exp_iter));
    t_exp = longint'(2 * exp_iter * (N + W + 8) + N + 4);
    check(t_done - t_last == t_exp,
          $sformatf("clocks last input->done %0d expected %0d", t_done - t_last, t_exp));
    $display("clocks from last input pixel to done: %0d", t_done - t_last);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_job(5, 2);
    run_job(3, 0);
    run_job(8, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (15000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
