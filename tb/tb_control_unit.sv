// tb_control_unit: self-checking testbench of the control unit.
// A small behavioural stand-in for the datapath answers the control unit:
// it reports load_done a few clocks after load_en rises, pass_done a
// fixed delay after each pass_start with a scripted pass_changed, and
// unload_done after unload_start. Checks the order of operations, the
// sub-iteration of every pass, that thinning stops after the first
// iteration whose two passes change nothing, the iteration count, busy
// and the one-clock done pulse.
module tb_control_unit;
  import thin_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [7:0] iterations;

  du_cu_if ctl ();
  control_unit dut (.clk, .rst_n, .start, .ctl, .busy, .done, .iterations);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Scripted pass outcomes; the job must end after the first pair of 0s.
  bit script[$];
  int pass_idx, n_passes, n_loads, n_unloads, n_done;
  bit exp_sub2;

  // Datapath stand-in.
  int load_cnt, pass_cnt, unload_cnt;
  bit pass_busy, unload_busy, cur_changed;
  always @(posedge clk) begin
    ctl.pass_done   <= 0;
    ctl.unload_done <= 0;
    if (ctl.load_en) load_cnt <= load_cnt + 1; else load_cnt <= 0;
    ctl.load_done <= ctl.load_en && load_cnt >= 4;
    if (ctl.pass_start) begin
      check(!pass_busy && !unload_busy && !ctl.load_en, "pass_start while idle");
      check((ctl.sub == SUB_2) == exp_sub2, $sformatf("sub of pass %0d", pass_idx));
      exp_sub2 <= !exp_sub2;
      pass_busy <= 1;
      pass_cnt <= 0;
      cur_changed <= (pass_idx < script.size()) ? script[pass_idx] : 1'b0;
      pass_idx <= pass_idx + 1;
      n_passes <= n_passes + 1;
    end else if (pass_busy) begin
      pass_cnt <= pass_cnt + 1;
      if (pass_cnt == 7) begin
        pass_busy <= 0;
        ctl.pass_done <= 1;
        ctl.pass_changed <= cur_changed;
      end
    end
    if (ctl.unload_start) begin
      check(!pass_busy, "unload_start after passes");
      unload_busy <= 1;
      unload_cnt <= 0;
      n_unloads <= n_unloads + 1;
    end else if (unload_busy) begin
      unload_cnt <= unload_cnt + 1;
      if (unload_cnt == 5) begin
        unload_busy <= 0;
        ctl.unload_done <= 1;
      end
    end
    if (done) n_done <= n_done + 1;
  end

  task automatic run_job(bit s[$], int exp_passes, int exp_iter);
    script = s;
    pass_idx = 0; n_passes = 0; n_unloads = 0; n_done = 0; exp_sub2 = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(busy && ctl.load_en, "load after start");
    wait (done);
    @(posedge clk);
    #1;
    check(!done && !busy, "done lasts one clock, then idle");
    check(n_passes == exp_passes, $sformatf("%0d passes, expected %0d", n_passes, exp_passes));
    check(n_unloads == 1 && n_done == 1, "one unload and one done");
    check(iterations == 8'(exp_iter), $sformatf("iterations %0d expected %0d", iterations, exp_iter));
    repeat (3) @(negedge clk);
    check(!busy, "stays idle without start");
  endtask

  initial begin
    ctl.load_done = 0; ctl.pass_done = 0; ctl.pass_changed = 0; ctl.unload_done = 0;
    load_cnt = 0; pass_busy = 0; unload_busy = 0; pass_cnt = 0; unload_cnt = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(!busy && !done, "idle after reset");
    run_job('{1, 1, 0, 1, 1, 0, 0, 0}, 8, 4);
    run_job('{0, 0}, 2, 1);
    run_job('{1, 0, 0, 0, 1, 1}, 4, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
