// tb_datapath_unit: self-checking testbench of the datapath unit.
// Acts as the control unit by hand on a 12 x 9 frame: loads a random
// frame with gaps in pix_in_valid, runs sub-iteration passes one at a time,
// unloads after each and compares with the reference model. Also checks
// the pass length (W*H + W + 7 clocks from pass_start to pass_done), the
// pass_changed flag, and the unload timing (first pixel two clocks after
// unload_start, W*H consecutive pixels, unload_done with the last).
module tb_datapath_unit;
  import thin_pkg::*;
  import thin_ref_pkg::*;

  localparam int W = 12, H = 9, N = W * H;
  logic clk = 0, rst_n = 0;
  logic pix_in, pix_in_valid, in_ready, pix_out, pix_out_valid;

  du_cu_if ctl ();
  datapath_unit #(.W(W), .H(H)) dut (.clk, .rst_n, .ctl, .pix_in, .pix_in_valid,
                                     .in_ready, .pix_out, .pix_out_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_changed = 0, n_unchanged = 0;
  bit img[];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic load(const ref bit im[]);
    int i = 0;
    @(negedge clk) ctl.load_en = 1;
    while (i < N) begin
      pix_in_valid = ($urandom_range(0, 3) != 0);
      pix_in = im[i];
      @(posedge clk);
      if (pix_in_valid && in_ready) i++;
      @(negedge clk);
    end
    pix_in_valid = 0;
    check(ctl.load_done && !in_ready, "load_done after W*H pixels");
    ctl.load_en = 0;
  endtask

  task automatic run_pass(bit sub2, bit exp_changed);
    int t = 0;
    @(negedge clk);
    ctl.sub = sub2 ? SUB_2 : SUB_1;
    ctl.pass_start = 1;
    @(negedge clk) ctl.pass_start = 0;
    t = 1;
    while (!ctl.pass_done && t < 3 * N) begin
      @(negedge clk);
      t++;
    end
    check(t == N + W + 7, $sformatf("pass length %0d, expected %0d", t, N + W + 7));
    check(ctl.pass_changed == exp_changed, "pass_changed");
    if (exp_changed) n_changed++; else n_unchanged++;
  endtask

  task automatic unload_check(const ref bit im[]);
    int k = 0, t = 0, first = -1;
    bit ok = 1, done_seen = 0;
    @(negedge clk) ctl.unload_start = 1;
    @(posedge clk);
    @(negedge clk) ctl.unload_start = 0;
    t = 1;
    while (k < N && t < 3 * N) begin
      @(posedge clk);
      #1;
      t++;
      if (pix_out_valid) begin
        if (first < 0) first = t;
        if (pix_out !== im[k]) ok = 0;
        if (ctl.unload_done) done_seen = (k == N - 1);
        k++;
      end
    end
    check(first == 2, $sformatf("first output at clock %0d", first));
    check(t == N + 1, "output pixels consecutive");
    check(ok, "unloaded frame equals reference");
    check(done_seen, "unload_done with last pixel");
  endtask

  initial begin
    ctl.load_en = 0; ctl.pass_start = 0; ctl.sub = SUB_1; ctl.unload_start = 0;
    pix_in = 0; pix_in_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      img = new[N];
      // Random blobs: thick enough to need several passes.
      foreach (img[i]) img[i] = 0;
      for (int b = 0; b < 3; b++) begin
        int r0 = $urandom_range(0, H - 4), c0 = $urandom_range(0, W - 5);
        int rh = $urandom_range(3, 5), cw = $urandom_range(3, 7);
        for (int r = r0; r < r0 + rh && r < H; r++)
          for (int c = c0; c < c0 + cw && c < W; c++) img[r * W + c] = 1;
      end
      load(img);
      unload_check(img);
      for (int p = 0; p < 12; p++) begin
        int d;
        d = zs_pass(img, W, H, p[0]);
        run_pass(p[0], d != 0);
        unload_check(img);
      end
    end
    check(n_changed > 0 && n_unchanged > 0, "passes with and without deletions");
    $display("passes with deletions %0d, without %0d", n_changed, n_unchanged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
